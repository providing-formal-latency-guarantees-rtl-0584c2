// tb_dma_arq_rx: checks the DMA ARQ receiver. A sender model in this bench
// builds 9-flit packets (head + 8 words + CRC); the bench keeps its own
// model of the destination memory and of the expected replies. Checked:
//  - intact packets are written to base + 8 * index, word by word, under
//    random memory back-pressure;
//  - a corrupt packet is dropped and never written;
//  - the packet flagged last gets a NACK listing exactly the missing packets,
//    or an ACK when nothing is missing; `done` pulses once per transfer;
//  - a duplicate is dropped (no write) but its last flag still gets a reply;
//  - a corrupt packet flagged last gets no reply;
//  - a new transfer number restarts the bookkeeping.
module tb_dma_arq_rx;
  import arq_pkg::*;

  localparam int AW = 11;

  logic clk = 0, rst_n = 0;
  logic [NODE_W-1:0] node_id = 4'd9;
  logic in_valid, in_ready, wr_valid, wr_ready, rsp_valid, rsp_ready;
  flit_t in_flit, rsp_flit;
  logic [AW-1:0] wr_addr;
  logic [FLIT_W-1:0] wr_data;
  logic done, ev_dup, ev_crc_drop, ev_nack;

  int checks = 0, failures = 0, cyc = 0;
  int n_writes = 0, n_done = 0, n_dup = 0, n_crc = 0;
  logic [FLIT_W-1:0] mem [2048];
  typedef struct { ptype_e t; logic [127:0] map; logic [7:0] xid; } rsp_t;
  rsp_t rsps [$];
  hdr_t rh;
  logic [15:0] rcrc;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  dma_arq_rx #(.AW(AW)) dut (.*);

  function automatic logic [FLIT_W-1:0] word_of(input int x, input int s, input int w);
    return {32'(x), 32'(s), 32'(w), 32'hFACE0000 + 32'(s * 8 + w)};
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  always @(posedge clk) begin
    wr_ready  <= ($urandom % 4) != 0;
    rsp_ready <= ($urandom % 3) != 0;
    if (rst_n && wr_valid && wr_ready) begin mem[wr_addr] = wr_data; n_writes++; end
    if (rst_n && done) n_done++;
    if (rst_n && ev_dup) n_dup++;
    if (rst_n && ev_crc_drop) n_crc++;
    if (rst_n && rsp_valid && rsp_ready) begin
      if (is_head(rsp_flit.kind)) begin
        rh = hdr_t'(rsp_flit.data);
        rcrc = crc16_word(16'hFFFF, mask_route(rsp_flit.data));
        checks++;
        if (rh.src != node_id || rh.dst != 4'd3) fail("reply addressing");
      end else rcrc = crc16_word(rcrc, rsp_flit.data);
      if (is_tail(rsp_flit.kind)) begin
        checks++;
        if (rsp_flit.chk !== rcrc) fail("reply CRC");
        rsps.push_back('{rh.ptype, (rsp_flit.kind == FL_TAIL) ? rsp_flit.data : '0, rh.xfer_id});
      end
    end
  end

  task automatic send_pkt(input int xid, input int seq, input int n, input int base,
                          input bit last, input bit corrupt);
    hdr_t h;
    logic [15:0] c;
    h = '0; h.ptype = PT_DMA_DATA; h.src = 4'd3; h.dst = node_id; h.xfer_id = 8'(xid);
    h.seq = 8'(seq); h.npkts_m1 = 8'(n - 1); h.last = last; h.base_addr = 32'(base);
    h.route = 24'hABCDEF;      // routers leave arbitrary bits here
    c = crc16_word(16'hFFFF, mask_route(h));
    for (int w = 0; w <= 8; w++) begin
      @(negedge clk);
      in_valid = 1;
      if (w == 0) begin in_flit.kind = FL_HEAD; in_flit.data = h; in_flit.chk = '0; end
      else begin
        in_flit.data = word_of(xid, seq, w - 1);
        c = crc16_word(c, in_flit.data);
        in_flit.kind = (w == 8) ? FL_TAIL : FL_BODY;
        if (corrupt && w == 4) in_flit.data[0] = ~in_flit.data[0];
        in_flit.chk = (w == 8) ? c : '0;
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_rsp(input ptype_e t, input logic [127:0] map, input int xid);
    int t0;
    t0 = cyc;
    while (rsps.size() == 0 && cyc - t0 < 200) @(posedge clk);
    checks++;
    if (rsps.size() == 0) fail("no reply");
    else begin
      rsp_t r;
      r = rsps.pop_front();
      if (r.t != t || r.map != map || r.xid != 8'(xid))
        fail($sformatf("reply %0d map %h, expected %0d map %h", r.t, r.map, t, map));
    end
  endtask

  task automatic check_pkt_mem(input int xid, input int seq, input int base, input bit present);
    for (int w = 0; w < 8; w++) begin
      checks++;
      if ((mem[base + seq * 8 + w] === word_of(xid, seq, w)) != present)
        fail($sformatf("memory of pkt %0d word %0d (present=%0d)", seq, w, present));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw;
    in_valid = 0; in_flit = '0;
    for (int a = 0; a < 2048; a++) mem[a] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // transfer 1: 5 packets, packet 2 corrupt
    for (int s = 0; s < 5; s++) send_pkt(1, s, 5, 64, s == 4, s == 2);
    expect_rsp(PT_DMA_NACK, 128'b00100, 1);
    for (int s = 0; s < 5; s++) check_pkt_mem(1, s, 64, s != 2);
    checks++;
    if (n_crc != 1 || n_done != 0) fail("corrupt packet not dropped");
    // resend packet 2 with last: ACK, done
    send_pkt(1, 2, 5, 64, 1, 0);
    expect_rsp(PT_DMA_ACK, '0, 1);
    check_pkt_mem(1, 2, 64, 1);
    checks++;
    if (n_done != 1) fail("done missing");
    // duplicate of the last packet: dropped, but acknowledged again
    nw = n_writes;
    send_pkt(1, 4, 5, 64, 1, 0);
    expect_rsp(PT_DMA_ACK, '0, 1);
    checks++;
    if (n_dup != 1 || n_writes != nw || n_done != 1) fail("duplicate handling");

    // transfer 2: 6 packets at base 500, packets 0 and 5 lost in the network
    for (int s = 1; s < 5; s++) send_pkt(2, s, 6, 500, 0, 0);
    repeat (50) @(posedge clk);
    checks++;
    if (rsps.size() != 0) fail("reply without last flag");
    // the sender times out and resends the last packet, corrupted again
    send_pkt(2, 5, 6, 500, 1, 1);
    repeat (50) @(posedge clk);
    checks++;
    if (rsps.size() != 0) fail("reply to a corrupt packet");
    send_pkt(2, 5, 6, 500, 1, 0);
    expect_rsp(PT_DMA_NACK, 128'b000001, 2);
    send_pkt(2, 0, 6, 500, 1, 0);
    expect_rsp(PT_DMA_ACK, '0, 2);
    for (int s = 0; s < 6; s++) check_pkt_mem(2, s, 500, 1);
    checks++;
    if (n_done != 2) fail("second transfer not done");
    checks++;
    if (n_writes != 8 * 11) fail($sformatf("%0d memory writes", n_writes));

    $display("mechanisms: crc_drop=%0d dup=%0d done=%0d", n_crc, n_dup, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
