// tb_gbn_tx: checks the Go-Back-N sender with a window of 3 packets (the
// same logic is Stop-and-Wait with the default window of 1). A receiver
// model in this bench checks headers, payload and CRC of each packet and
// returns cumulative ACKs. Checked:
//  - at most WINDOW packets are outstanding: the tile is held off after 3;
//  - a cumulative ACK frees the window and the next packets go out;
//  - with no ACK for TOUT cycles all unacknowledged packets are resent in
//    order (go back N), not earlier than TOUT after the last send;
//  - corrupt ACKs and ACKs from the wrong node are ignored;
//  - a new destination gets its own sequence numbers.
module tb_gbn_tx;
  import arq_pkg::*;

  localparam int WINDOW = 3, TOUT = 60;

  logic clk = 0, rst_n = 0;
  logic [NODE_W-1:0] node_id = 4'd4;
  logic pkt_valid, pkt_ready, out_valid, out_ready, rsp_valid, rsp_ready, ev_timeout;
  logic [NODE_W-1:0] pkt_dst;
  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] pkt_data;
  flit_t out_flit, rsp_flit;

  int checks = 0, failures = 0, cyc = 0, n_timeout = 0;
  typedef struct { int dst; int seq; int tail_cyc; } rx_t;
  rx_t rxq [$];
  hdr_t h;
  int widx;
  logic [15:0] crc;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  gbn_tx #(.WINDOW(WINDOW), .TOUT(TOUT)) dut (.*);

  function automatic logic [FLIT_W-1:0] word_of(input int d, input int s, input int w);
    return {32'(d), 32'(s), 32'(w), 32'h600D0000};
  endfunction

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (rst_n && ev_timeout) n_timeout++;
    if (rst_n && out_valid && out_ready) begin
      if (out_flit.kind == FL_HEAD) begin
        h = hdr_t'(out_flit.data); widx = 0;
        crc = crc16_word(16'hFFFF, mask_route(out_flit.data));
        checks++;
        if (h.ptype != PT_GEN_DATA || h.src != node_id) fail("header");
      end else begin
        crc = crc16_word(crc, out_flit.data);
        checks++;
        if (out_flit.data !== word_of(h.dst, h.seq, widx)) fail("payload");
        widx++;
        if (out_flit.kind == FL_TAIL) begin
          checks++;
          if (out_flit.chk !== crc || widx != GEN_PKT_WORDS) fail("tail");
          rxq.push_back('{int'(h.dst), int'(h.seq), cyc});
        end
      end
    end
  end

  task automatic offer(input int d, input int s);
    @(negedge clk);
    pkt_valid = 1; pkt_dst = 4'(d);
    for (int w = 0; w < GEN_PKT_WORDS; w++) pkt_data[w] = word_of(d, s, w);
    @(posedge clk);
    while (!pkt_ready) @(posedge clk);
    @(negedge clk);
    pkt_valid = 0;
  endtask

  task automatic ack(input int from, input int a, input bit corrupt);
    hdr_t x;
    x = '0; x.ptype = PT_GEN_ACK; x.src = 4'(from); x.dst = node_id; x.seq = 8'(a);
    @(negedge clk);
    rsp_valid = 1; rsp_flit.kind = FL_SINGLE; rsp_flit.data = x;
    rsp_flit.chk = crc16_word(16'hFFFF, mask_route(x)) ^ (corrupt ? 16'h1 : 16'h0);
    @(negedge clk);
    rsp_valid = 0;
  endtask

  task automatic wait_n(input int n);
    int t0;
    t0 = cyc;
    while (rxq.size() < n && cyc - t0 < 2000) @(posedge clk);
    checks++;
    if (rxq.size() < n) fail($sformatf("only %0d of %0d packets", rxq.size(), n));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_last;
    pkt_valid = 0; pkt_dst = 0; pkt_data = '0; rsp_valid = 0; rsp_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) offer(6, s);
    @(negedge clk);
    pkt_valid = 1; pkt_dst = 4'd6;
    for (int w = 0; w < GEN_PKT_WORDS; w++) pkt_data[w] = word_of(6, 3, w);
    #1;
    checks++;
    if (pkt_ready) fail("window of 3 exceeded");
    wait_n(3);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (rxq[s].seq != s || rxq[s].dst != 6) fail("first window order");
    end
    t_last = rxq[2].tail_cyc;
    rxq.delete();
    // corrupt ACK and ACK from another node: ignored
    ack(6, 2, 1);
    ack(5, 2, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (pkt_ready) fail("bad ACK moved the window");
    // ACK 2 (packets 0, 1): packet 3 enters
    ack(6, 2, 0);
    @(posedge clk);
    while (!pkt_ready) @(posedge clk);
    @(negedge clk);
    pkt_valid = 0;
    wait_n(1);
    checks++;
    if (rxq[0].seq != 3) fail("packet 3 not sent after ACK");
    t_last = rxq[0].tail_cyc;
    rxq.delete();
    // no more ACKs: go back to packet 2 and resend 2, 3
    wait_n(2);
    checks++;
    if (rxq[0].seq != 2 || rxq[1].seq != 3 || n_timeout != 1) fail("go-back-N resend");
    checks++;
    if (rxq[0].tail_cyc - t_last < TOUT) fail("timeout too early");
    rxq.delete();
    ack(6, 4, 0);
    repeat (TOUT + 20) @(posedge clk);
    checks++;
    if (rxq.size() != 0 || n_timeout != 1) fail("resend after full ACK");
    // new destination starts at sequence 0; old destination continues at 4
    offer(8, 0);
    wait_n(1);
    checks++;
    if (rxq[0].dst != 8 || rxq[0].seq != 0) fail("per-destination sequence");
    ack(8, 1, 0);
    offer(6, 4);
    wait_n(2);
    checks++;
    if (rxq[1].dst != 6 || rxq[1].seq != 4) fail("sequence of old destination");
    ack(6, 5, 0);
    $display("mechanisms: timeout=%0d", n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
