// tb_gbn_rx: checks the Go-Back-N / Stop-and-Wait receiver. A sender model in
// this bench sends 5-flit packets from two source nodes. Checked:
//  - in-order packets are delivered to the tile with the right source and
//    payload, each followed by an ACK carrying the next expected number;
//  - a duplicate or out-of-order packet is discarded (not delivered) and the
//    current cumulative ACK is sent again;
//  - a corrupt packet is dropped without an ACK;
//  - each source has its own expected sequence number;
//  - tile back-pressure holds the receiver.
module tb_gbn_rx;
  import arq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NODE_W-1:0] node_id = 4'd1;
  logic in_valid, in_ready, pkt_valid, pkt_ready, rsp_valid, rsp_ready, ev_discard, ev_crc_drop;
  flit_t in_flit, rsp_flit;
  logic [NODE_W-1:0] pkt_src;
  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] pkt_data;

  int checks = 0, failures = 0, cyc = 0, n_disc = 0, n_crc = 0;
  typedef struct { int src; int seq; } d_t;
  d_t dq [$];
  d_t aq [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  gbn_rx dut (.*);

  function automatic logic [FLIT_W-1:0] word_of(input int src, input int s, input int w);
    return {32'(src), 32'(s), 32'(w), 32'hBEEF0000};
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  always @(posedge clk) begin
    pkt_ready <= ($urandom % 3) != 0;
    rsp_ready <= ($urandom % 2) != 0;
    if (rst_n && ev_discard) n_disc++;
    if (rst_n && ev_crc_drop) n_crc++;
    if (rst_n && pkt_valid && pkt_ready) begin
      automatic int s = int'(pkt_data[0][95:64]);
      checks++;
      for (int w = 0; w < GEN_PKT_WORDS; w++)
        if (pkt_data[w] !== word_of(pkt_src, s, w)) fail("delivered payload");
      dq.push_back('{int'(pkt_src), s});
    end
    if (rst_n && rsp_valid && rsp_ready) begin
      automatic hdr_t x = hdr_t'(rsp_flit.data);
      checks++;
      if (rsp_flit.kind != FL_SINGLE || x.ptype != PT_GEN_ACK || x.src != node_id ||
          rsp_flit.chk !== crc16_word(16'hFFFF, mask_route(rsp_flit.data))) fail("ACK format");
      aq.push_back('{int'(x.dst), int'(x.seq)});
    end
  end

  task automatic send(input int src, input int seq, input bit corrupt);
    hdr_t h;
    logic [15:0] c;
    h = '0; h.ptype = PT_GEN_DATA; h.src = 4'(src); h.dst = node_id; h.seq = 8'(seq);
    c = crc16_word(16'hFFFF, mask_route(h));
    for (int w = 0; w <= GEN_PKT_WORDS; w++) begin
      @(negedge clk);
      in_valid = 1;
      if (w == 0) begin in_flit.kind = FL_HEAD; in_flit.data = h; in_flit.chk = '0; end
      else begin
        in_flit.data = word_of(src, seq, w - 1);
        c = crc16_word(c, in_flit.data);
        in_flit.kind = (w == GEN_PKT_WORDS) ? FL_TAIL : FL_BODY;
        in_flit.chk = (w == GEN_PKT_WORDS) ? (corrupt ? ~c : c) : '0;
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_ack(input int src, input int a);
    int t0;
    t0 = cyc;
    while (aq.size() == 0 && cyc - t0 < 100) @(posedge clk);
    checks++;
    if (aq.size() == 0) fail("no ACK");
    else begin
      d_t x;
      x = aq.pop_front();
      if (x.src != src || x.seq != a) fail($sformatf("ACK %0d/%0d expected %0d/%0d", x.src, x.seq, src, a));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(3, 0, 0); expect_ack(3, 1);
    send(3, 1, 0); expect_ack(3, 2);
    send(3, 1, 0); expect_ack(3, 2);        // duplicate
    send(3, 3, 0); expect_ack(3, 2);        // out of order
    send(7, 0, 0); expect_ack(7, 1);        // other source
    send(3, 2, 1);                          // corrupt: no ACK
    repeat (40) @(posedge clk);
    checks++;
    if (aq.size() != 0) fail("ACK for a corrupt packet");
    send(3, 2, 0); expect_ack(3, 3);
    send(3, 3, 0); expect_ack(3, 4);
    checks++;
    if (dq.size() != 5) fail($sformatf("%0d packets delivered", dq.size()));
    else begin
      if (dq[0].seq != 0 || dq[1].seq != 1 || dq[2].src != 7 || dq[3].seq != 2 || dq[4].seq != 3)
        fail("delivery order");
    end
    checks++;
    if (n_disc != 2 || n_crc != 1) fail("discard counts");
    $display("mechanisms: discard=%0d crc_drop=%0d", n_disc, n_crc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
