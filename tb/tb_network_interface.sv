// tb_network_interface: checks the network interface between four flit
// sources/sinks and a router local port modelled in this bench.
// Injection: the four sources send packets with random lengths; the router
// model returns each credit 1-4 cycles after a flit and sometimes withholds
// credits. Checked: data sources go on VC0 and reply sources on VC1, packets
// of one VC never interleave, every head carries the XY route to its
// destination, nothing is sent without a credit, all flits arrive in order.
// Ejection: packets of all four types arrive on their VC; each must reach the
// right engine, in order, a credit must come back per flit, and a fault
// injection must flip data bit 0 of exactly the next ejected flit.
module tb_network_interface;
  import arq_pkg::*;

  localparam int COLS = 4, DEPTH = 4, PKTS = 25;

  logic clk = 0, rst_n = 0;
  logic [NODE_W-1:0] node_id = 4'd5;
  logic fault_inj;
  logic [3:0] src_valid, src_ready, snk_valid, snk_ready;
  flit_t src_flit [4];
  flit_t snk_flit [4];
  logic inj_valid, inj_vc, ej_valid, ej_vc, ev_inj_stall;
  flit_t inj_flit, ej_flit;
  logic [NVC-1:0] inj_credit, ej_credit;

  int checks = 0, failures = 0, cyc = 0, n_stall = 0, n_flip = 0;
  flit_t sq [4][$];       // flits each source still has to send
  flit_t eq [4][$];       // flits each sink expects
  int cred [NVC];
  int due [NVC][$];
  int vcur [NVC];
  int ejq_total = 0, ej_sent = 0, ej_cred = 0, ej_got = 0, inj_got = 0, inj_total = 0;
  flit_t ejq [$];
  bit    ejq_vc [$];
  bit    hold_credit = 0;
  bit    flip_next = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  network_interface #(.COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  // independent route: node 5 is row 1 column 1
  function automatic logic [ROUTE_W-1:0] route_from5(input int d);
    logic [ROUTE_W-1:0] r;
    int k, c, row;
    r = '0; k = 0; c = 1; row = 1;
    while (c != d % COLS) begin r[3*k +: 3] = (c < d % COLS) ? 3'd2 : 3'd4; c += (c < d % COLS) ? 1 : -1; k++; end
    while (row != d / COLS) begin r[3*k +: 3] = (row < d / COLS) ? 3'd3 : 3'd1; row += (row < d / COLS) ? 1 : -1; k++; end
    return r;
  endfunction

  // sources: present the front flit, pop on ready
  always_comb for (int s = 0; s < 4; s++) begin
    src_valid[s] = sq[s].size() != 0;
    src_flit[s]  = (sq[s].size() != 0) ? sq[s][0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) if (src_valid[s] && src_ready[s]) void'(sq[s].pop_front());
    if (rst_n && ev_inj_stall) n_stall++;
    // router model, injection side
    inj_credit <= '0;
    for (int v = 0; v < NVC; v++)
      if (!hold_credit && due[v].size() != 0 && due[v][0] <= cyc) begin
        void'(due[v].pop_front());
        inj_credit[v] <= 1'b1;
        cred[v]++;
      end
    if (inj_valid) begin
      automatic int v = int'(inj_vc);
      automatic int s = int'(inj_flit.data[63:32]);
      automatic flit_t e;
      inj_got++;
      checks++;
      if (cred[v] <= 0) fail("flit sent without credit");
      cred[v]--;
      due[v].push_back(cyc + 1 + $urandom % 4);
      if (v != s / 2) fail("wrong VC for source");
      if (is_head(inj_flit.kind)) begin
        if (vcur[v] != -1) fail("packets interleaved on a VC");
        vcur[v] = s;
      end else if (vcur[v] != s) fail("flit from another source inside a packet");
      if (is_tail(inj_flit.kind)) vcur[v] = -1;
      e = eq[s].pop_front();
      if (is_head(e.kind)) begin
        automatic hdr_t h = hdr_t'(e.data);
        h.route = route_from5(int'(h.dst));
        e.data = h;
      end
      if (inj_flit !== e) fail($sformatf("injected flit of source %0d differs", s));
    end
    // router model, ejection side
    ej_valid <= 1'b0;
    if (ej_credit[0]) ej_cred++;
    if (ej_credit[1]) ej_cred++;
    if (ejq.size() != 0 && (ej_sent - ej_cred) < DEPTH - 1 && $urandom % 3 != 0) begin
      ej_valid <= 1'b1;
      ej_flit  <= ejq.pop_front();
      ej_vc    <= ejq_vc.pop_front();
      ej_sent++;
    end
  end

  // sinks
  flit_t sink_exp [4][$];
  always @(posedge clk) begin
    snk_ready <= 4'($urandom);
    if (rst_n) for (int k = 0; k < 4; k++) if (snk_valid[k] && snk_ready[k]) begin
      automatic flit_t e = sink_exp[k].pop_front();
      ej_got++;
      checks++;
      if (snk_flit[k].data[0] != e.data[0]) n_flip++;
      if (snk_flit[k].data[127:1] !== e.data[127:1] || snk_flit[k].kind != e.kind)
        fail($sformatf("sink %0d got a wrong flit", k));
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ptype_e pt [4];
    pt[0] = PT_DMA_DATA; pt[1] = PT_GEN_DATA; pt[2] = PT_DMA_NACK; pt[3] = PT_GEN_ACK;
    vcur[0] = -1; vcur[1] = -1; cred[0] = DEPTH; cred[1] = DEPTH;
    fault_inj = 0; ej_valid = 0; ej_flit = '0; ej_vc = 0; inj_credit = '0;
    // injection traffic
    for (int s = 0; s < 4; s++)
      for (int p = 0; p < PKTS; p++) begin
        automatic int len = (s >= 2) ? $urandom % 2 : 1 + $urandom % 8;
        automatic hdr_t h = '0;
        automatic flit_t f;
        h.ptype = pt[s]; h.dst = 4'($urandom % 12); h.src = node_id;
        f.data = h; f.data[63:32] = 32'(s); f.data[31:0] = 32'(p); f.chk = 16'(p);
        f.kind = (len == 0) ? FL_SINGLE : FL_HEAD;
        sq[s].push_back(f); eq[s].push_back(f); inj_total++;
        for (int w = 0; w < len; w++) begin
          f.data = {64'(w), 32'(s), 32'(p)};
          f.kind = (w == len - 1) ? FL_TAIL : FL_BODY;
          sq[s].push_back(f); eq[s].push_back(f); inj_total++;
        end
      end
    // ejection traffic, packets of the four types in random order
    for (int p = 0; p < 60; p++) begin
      automatic int k = $urandom % 4;
      automatic int len = (k >= 2) ? $urandom % 2 : 1 + $urandom % 8;
      automatic hdr_t h = '0;
      automatic flit_t f;
      h.ptype = pt[k]; h.dst = node_id;
      f.data = h; f.data[31:0] = 32'(p); f.chk = '0;
      f.kind = (len == 0) ? FL_SINGLE : FL_HEAD;
      ejq.push_back(f); ejq_vc.push_back(k >= 2); sink_exp[k].push_back(f); ejq_total++;
      for (int w = 0; w < len; w++) begin
        f.data = {32'(p), 32'(k), 64'(w) << 1};
        f.kind = (w == len - 1) ? FL_TAIL : FL_BODY;
        ejq.push_back(f); ejq_vc.push_back(k >= 2); sink_exp[k].push_back(f); ejq_total++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // hold router credits for a while to force injection stalls
    hold_credit = 1;
    repeat (30) @(posedge clk);
    hold_credit = 0;
    repeat (20) @(posedge clk);
    @(negedge clk); fault_inj = 1;
    @(negedge clk); fault_inj = 0;
    while ((inj_got < inj_total || ej_got < ejq_total) && cyc < 20000) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (inj_got != inj_total || ej_got != ejq_total) fail($sformatf("inj %0d/%0d ej %0d/%0d", inj_got, inj_total, ej_got, ejq_total));
    checks++;
    if (ej_cred != ej_sent) fail("ejection credits not all returned");
    checks++;
    if (n_flip != 1) fail($sformatf("%0d flipped flits, expected 1", n_flip));
    checks++;
    if (n_stall == 0) fail("no credit stall exercised");
    $display("mechanisms: stall_cycles=%0d flips=%0d", n_stall, n_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
