// tb_dma_arq_tx: checks the DMA ARQ sender together with a local memory.
// A receiver model in this bench collects the flits, checks every header
// field, every payload word against the memory contents and the CRC, and
// answers with ACK / NACK packets. Checked behaviour:
//  - all packets of a transfer go out back to back without any ACK, the
//    whole 4-packet pass within t_mem + 4 * 10 + 8 cycles;
//  - only the packet flagged last of a pass asks for a reply;
//  - an ACK completes the transfer (done), a NACK makes exactly the packets
//    in its bitmap go out again, each re-read from memory (>= t_mem);
//  - with no reply for TOUT cycles the last packet is resent;
//  - replies with a wrong transfer number or a bad CRC are ignored;
//  - a long transfer under random back-pressure delivers every word.
module tb_dma_arq_tx;
  import arq_pkg::*;

  localparam int AW = 11, T_MEM = 40, TOUT = 60;

  logic clk = 0, rst_n = 0;
  logic [NODE_W-1:0] node_id = 4'd2;
  logic start_valid, start_ready, done;
  logic [NODE_W-1:0] start_dst;
  logic [AW-1:0] start_src_addr;
  logic [31:0] start_dst_addr;
  logic [7:0] start_npkts_m1;
  logic rd_en, rd_valid;
  logic [AW-1:0] rd_addr;
  logic [FLIT_W-1:0] rd_data;
  logic out_valid, out_ready, rsp_valid, rsp_ready;
  flit_t out_flit, rsp_flit;
  logic ev_nack, ev_timeout, ev_retx;
  logic t_en, t_we;
  logic [AW-1:0] t_addr;
  logic [FLIT_W-1:0] t_wdata, t_rdata;

  int checks = 0, failures = 0, cyc = 0;
  int n_timeout = 0, n_nack = 0, n_retx = 0, n_done = 0;
  logic rand_ready = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  dma_arq_tx #(.TOUT(TOUT), .AW(AW)) dut (.*);

  local_mem #(.WORDS(2048), .W(FLIT_W), .LAT(T_MEM)) u_mem (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_valid, .rd_data,
    .wr_en(1'b0), .wr_addr('0), .wr_data('0),
    .t_en, .t_we, .t_addr, .t_wdata, .t_rdata);

  function automatic logic [FLIT_W-1:0] word_of(input int a);
    return {32'(a), 32'(a * 7 + 3), ~32'(a), 32'hC0DE0000 | 32'(a)};
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  // ---------------- receiver model ----------------
  typedef struct { int seq; bit last; int head_cyc; int tail_cyc; } rx_pkt_t;
  rx_pkt_t rxq [$];
  hdr_t    cur_h;
  int      widx, head_cyc;
  logic [15:0] crc;
  int      exp_src_addr, exp_dst;
  logic [7:0] exp_npkts_m1;
  logic [31:0] exp_dst_addr;
  logic [7:0] last_xfer;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_flit.kind == FL_HEAD) begin
      cur_h = hdr_t'(out_flit.data);
      widx = 0; head_cyc = cyc;
      crc = crc16_word(16'hFFFF, mask_route(out_flit.data));
      checks++;
      if (cur_h.ptype != PT_DMA_DATA || cur_h.src != node_id || cur_h.dst != 4'(exp_dst) ||
          cur_h.npkts_m1 != exp_npkts_m1 || cur_h.base_addr != exp_dst_addr)
        fail("header fields");
      last_xfer = cur_h.xfer_id;
    end else begin
      checks++;
      if (out_flit.data !== word_of(exp_src_addr + int'(cur_h.seq) * 8 + widx))
        fail($sformatf("payload pkt %0d word %0d", cur_h.seq, widx));
      crc = crc16_word(crc, out_flit.data);
      widx++;
      if (out_flit.kind == FL_TAIL) begin
        checks++;
        if (widx != 8) fail("packet length");
        if (out_flit.chk !== crc) fail("tail CRC");
        rxq.push_back('{int'(cur_h.seq), cur_h.last, head_cyc, cyc});
      end
    end
  end

  always @(posedge clk) begin
    out_ready <= rand_ready ? ($urandom % 3 != 0) : 1'b1;
    if (rst_n && ev_timeout) n_timeout++;
    if (rst_n && ev_nack) n_nack++;
    if (rst_n && ev_retx) n_retx++;
    if (rst_n && done) n_done++;
  end

  task automatic send_rsp(input ptype_e t, input logic [7:0] xid, input logic [127:0] map, input bit corrupt);
    hdr_t h;
    logic [15:0] c;
    h = '0; h.ptype = t; h.src = 4'(exp_dst); h.dst = node_id; h.xfer_id = xid;
    c = crc16_word(16'hFFFF, mask_route(h));
    @(negedge clk);
    rsp_valid = 1;
    rsp_flit.data = h;
    if (t == PT_DMA_ACK) begin
      rsp_flit.kind = FL_SINGLE; rsp_flit.chk = corrupt ? ~c : c;
    end else begin
      rsp_flit.kind = FL_HEAD; rsp_flit.chk = '0;
      @(negedge clk);
      c = crc16_word(c, map);
      rsp_flit.kind = FL_TAIL; rsp_flit.data = map; rsp_flit.chk = corrupt ? ~c : c;
    end
    @(negedge clk);
    rsp_valid = 0;
  endtask

  task automatic start(input int dst, input int src_a, input int dst_a, input int n);
    exp_dst = dst; exp_src_addr = src_a; exp_dst_addr = 32'(dst_a); exp_npkts_m1 = 8'(n - 1);
    @(negedge clk);
    checks++;
    if (!start_ready) fail("not ready for a command");
    start_valid = 1; start_dst = 4'(dst); start_src_addr = AW'(src_a);
    start_dst_addr = 32'(dst_a); start_npkts_m1 = 8'(n - 1);
    @(negedge clk);
    start_valid = 0;
  endtask

  task automatic wait_pkts(input int n);
    int t0;
    t0 = cyc;
    while (rxq.size() < n && cyc - t0 < 5000) @(posedge clk);
    if (rxq.size() < n) fail($sformatf("only %0d of %0d packets", rxq.size(), n));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start, t_nack, t_end;
    rx_pkt_t p;
    start_valid = 0; start_dst = 0; start_src_addr = 0; start_dst_addr = 0; start_npkts_m1 = 0;
    rsp_valid = 0; rsp_flit = '0; t_en = 0; t_we = 0; t_addr = 0; t_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      t_en = 1; t_we = 1; t_addr = AW'(a); t_wdata = word_of(a);
    end
    @(negedge clk);
    t_en = 0; t_we = 0;

    // 1: error-free 4-packet transfer, ACK
    t_start = cyc;
    start(5, 16, 100, 4);
    wait_pkts(4);
    for (int i = 0; i < 4; i++) begin
      p = rxq[i];
      checks++;
      if (p.seq != i || p.last != (i == 3)) fail($sformatf("pass order pkt %0d", i));
    end
    checks++;
    if (rxq[3].tail_cyc - t_start > T_MEM + 4 * 10 + 8)
      fail($sformatf("4-packet pass took %0d cycles", rxq[3].tail_cyc - t_start));
    rxq.delete();
    repeat (10) @(posedge clk);
    checks++;
    if (n_done != 0) fail("done before ACK");
    send_rsp(PT_DMA_ACK, last_xfer, '0, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_done != 1 || !start_ready) fail("ACK did not complete the transfer");

    // 2: 6 packets, NACK for 0, 2, 5; then timeout; then bad replies; then ACK
    start(7, 300, 512, 6);
    wait_pkts(6);
    t_end = rxq[5].tail_cyc;
    rxq.delete();
    t_nack = cyc + 2;
    send_rsp(PT_DMA_NACK, last_xfer, 128'b100101, 0);
    wait_pkts(3);
    checks++;
    if (rxq.size() != 3 || rxq[0].seq != 0 || rxq[1].seq != 2 || rxq[2].seq != 5 ||
        rxq[0].last || rxq[1].last || !rxq[2].last) fail("selective retransmission set");
    checks++;
    if (rxq[0].tail_cyc - t_nack < T_MEM + 8) fail("retransmission faster than a memory read");
    checks++;
    if (n_nack != 1 || n_retx != 3) fail($sformatf("nack %0d retx %0d", n_nack, n_retx));
    t_end = rxq[2].tail_cyc;
    rxq.delete();
    // no reply: the last packet must come again after TOUT
    wait_pkts(1);
    checks++;
    if (rxq[0].seq != 5 || !rxq[0].last || n_timeout != 1) fail("timeout retransmission");
    checks++;
    if (rxq[0].head_cyc - t_end < TOUT) fail("timeout too early");
    rxq.delete();
    repeat (5) @(posedge clk);
    send_rsp(PT_DMA_ACK, last_xfer + 8'd1, '0, 0);   // wrong transfer
    send_rsp(PT_DMA_ACK, last_xfer, '0, 1);          // bad CRC
    repeat (5) @(posedge clk);
    checks++;
    if (n_done != 1) fail("bad reply accepted");
    send_rsp(PT_DMA_ACK, last_xfer, '0, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_done != 2) fail("second transfer not completed");
    rxq.delete();

    // 3: 40 packets under random back-pressure
    rand_ready = 1;
    start(1, 700, 0, 40);
    wait_pkts(40);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (rxq[i].seq != i) fail("long transfer order");
    end
    send_rsp(PT_DMA_ACK, last_xfer, '0, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_done != 3) fail("long transfer not completed");

    $display("mechanisms: nack=%0d timeout=%0d retx=%0d done=%0d", n_nack, n_timeout, n_retx, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
