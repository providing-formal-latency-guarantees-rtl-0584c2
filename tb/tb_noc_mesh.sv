// tb_noc_mesh: checks the 3 x 4 mesh. Every node injects packets to random
// destinations on both VCs, with the XY source route computed by an
// independent routine in this bench (column moves first, then row moves).
// Each node's ejection port takes flits and returns credits after a random
// delay. Checked: every packet arrives at its destination only, intact and in
// order per source/destination/VC, packets never interleave on an ejection VC,
// and the longest corner-to-corner path (5 hops) is used.
module tb_noc_mesh;
  import arq_pkg::*;

  localparam int ROWS = 3, COLS = 4, N = ROWS * COLS, DEPTH = 4, PKTS = 30;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] inj_valid, inj_vc, ej_valid, ej_vc;
  flit_t inj_flit [N];
  flit_t ej_flit [N];
  logic [N-1:0][NVC-1:0] inj_credit, ej_credit;

  int checks = 0, failures = 0, cyc = 0, total = 0, rcvd = 0, max_hops = 0;
  flit_t txq [N][NVC][$];
  int cred [N][NVC];
  int due [N][NVC][$];
  int ocur [N][NVC];
  int nexp [N][N][NVC];      // next packet number expected per src, dst, vc
  int wexp [N][NVC];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  noc_mesh #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  // independent XY route: list of ports, east/west first
  function automatic logic [ROUTE_W-1:0] route(input int s, input int d);
    logic [ROUTE_W-1:0] r;
    int k, c, row;
    r = '0; k = 0;
    c = s % COLS; row = s / COLS;
    while (c != d % COLS) begin
      r[3*k +: 3] = (c < d % COLS) ? 3'd2 : 3'd4;
      c += (c < d % COLS) ? 1 : -1; k++;
    end
    while (row != d / COLS) begin
      r[3*k +: 3] = (row < d / COLS) ? 3'd3 : 3'd1;
      row += (row < d / COLS) ? 1 : -1; k++;
    end
    return r;
  endfunction

  always @(posedge clk) begin
    ej_credit <= '0;
    if (!rst_n) inj_valid <= '0;
    else begin
      for (int n = 0; n < N; n++) begin
        automatic int v0 = $urandom % NVC;
        automatic bit s = 0;
        inj_valid[n] <= 1'b0;
        for (int k = 0; k < NVC; k++) begin
          automatic int v = (v0 + k) % NVC;
          if (!s && txq[n][v].size() != 0 && cred[n][v] > 0) begin
            inj_valid[n] <= 1'b1;
            inj_flit[n]  <= txq[n][v].pop_front();
            inj_vc[n]    <= 1'(v);
            cred[n][v]--;
            s = 1;
          end
        end
        for (int v = 0; v < NVC; v++) begin
          if (inj_credit[n][v]) cred[n][v]++;
          if (due[n][v].size() != 0 && due[n][v][0] <= cyc) begin
            void'(due[n][v].pop_front());
            ej_credit[n][v] <= 1'b1;
          end
        end
        if (ej_valid[n]) begin
          automatic flit_t f = ej_flit[n];
          automatic int v = int'(ej_vc[n]);
          automatic int src = int'(f.data[103:96]);
          automatic int dst = int'(f.data[95:88]);
          automatic int p   = int'(f.data[87:72]);
          automatic int w   = int'(f.data[71:64]);
          due[n][v].push_back(cyc + 1 + ($urandom % 4));
          rcvd++;
          checks++;
          if (dst != n) fail($sformatf("flit for node %0d ejected at %0d", dst, n));
          if (is_head(f.kind)) begin
            if (ocur[n][v] != -1) fail("packets interleaved at ejection");
            if (p != nexp[src][n][v]) fail($sformatf("packet order %0d->%0d", src, n));
            if (f.data[FLIT_W-1 -: ROUTE_W] != '0) fail("route not consumed");
            nexp[src][n][v]++;
            ocur[n][v] = src;
            wexp[n][v] = 1;
          end else begin
            if (ocur[n][v] != src || w != wexp[n][v]) fail("body flit out of place");
            wexp[n][v]++;
          end
          if (is_tail(f.kind)) ocur[n][v] = -1;
        end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++)
      for (int v = 0; v < NVC; v++) begin
        cred[s][v] = DEPTH; ocur[s][v] = -1;
        for (int d = 0; d < N; d++) nexp[s][d][v] = 0;
      end
    for (int s = 0; s < N; s++)
      for (int v = 0; v < NVC; v++) begin
        int cnt [N];
        for (int d = 0; d < N; d++) cnt[d] = 0;
        for (int p = 0; p < PKTS; p++) begin
          automatic int d = (p == 0) ? (N - 1 - s) : ($urandom % N);
          automatic int len = 1 + $urandom % 8;
          automatic int hops = (s % COLS > d % COLS ? s % COLS - d % COLS : d % COLS - s % COLS) +
                               (s / COLS > d / COLS ? s / COLS - d / COLS : d / COLS - s / COLS);
          automatic flit_t f;
          if (hops > max_hops) max_hops = hops;
          for (int w = 0; w <= len; w++) begin
            f.chk = '0;
            f.data = '0;
            f.data[103:96] = 8'(s);
            f.data[95:88]  = 8'(d);
            f.data[87:72]  = 16'(cnt[d]);
            f.data[71:64]  = 8'(w);
            if (w == 0) f.data[FLIT_W-1 -: ROUTE_W] = route(s, d);
            f.kind = (w == 0) ? FL_HEAD : (w == len) ? FL_TAIL : FL_BODY;
            txq[s][v].push_back(f);
            total++;
          end
          cnt[d]++;
        end
      end
    for (int n = 0; n < N; n++) inj_flit[n] = '0;
    inj_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (rcvd < total && cyc < 200000) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (rcvd != total) fail($sformatf("%0d of %0d flits arrived", rcvd, total));
    checks++;
    if (max_hops != ROWS + COLS - 2) fail("corner-to-corner path not used");
    $display("mechanisms: flits=%0d max_hops=%0d cycles=%0d", rcvd, max_hops, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
