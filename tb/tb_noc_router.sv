// tb_noc_router: checks one router with random wormhole traffic on all five
// inputs and both VCs. Each input/VC pair gets a queue of packets with random
// routes and lengths; flits are injected only against credits (4 per VC), and
// each output returns a credit 1-3 cycles after taking a flit. Checked:
//  - every packet leaves on the port named by its first route entry, with the
//    route shifted by one entry, its VC unchanged and its flits in order;
//  - on an output VC the flits of two packets never interleave (wormhole);
//  - every flit arrives, buffers never overflow (router assertion);
//  - contention for an output happens and is resolved (counted).
module tb_noc_router;
  import arq_pkg::*;

  localparam int NP = 5, NV = 2, DEPTH = 4, PKTS = 40;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] in_valid, out_valid;
  flit_t in_flit [NP];
  flit_t out_flit [NP];
  logic [NP-1:0][0:0] in_vc, out_vc;
  logic [NP-1:0][NV-1:0] credit_out, credit_in;

  int checks = 0, failures = 0, cyc = 0, n_contention = 0, sent = 0, rcvd = 0;
  flit_t txq [NP][NV][$];
  int    cred [NP][NV];
  int    cred_due [NP][NV][$];
  // per output VC: packet in progress (-1: none) given as input*NV+vc
  int    ocur [NP][NV];
  // expected packets per (input, vc) in order: output port and word count
  int    exp_out [NP][NV][$];
  int    exp_len [NP][NV][$];
  int    got_w [NP][NV];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  noc_router #(.NP(NP), .NV(NV), .DEPTH(DEPTH)) dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
  endtask

  // payload: {input, vc, packet, word}
  function automatic logic [FLIT_W-1:0] body(input int i, input int v, input int p, input int w);
    return {32'(i), 32'(v), 32'(p), 32'(w)};
  endfunction

  // injection
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= '0;
    end else begin
      for (int i = 0; i < NP; i++) begin
        automatic int v0 = $urandom % NV;
        automatic bit sent_i = 0;
        in_valid[i] <= 1'b0;
        for (int k = 0; k < NV; k++) begin
          automatic int v = (v0 + k) % NV;
          if (!sent_i && txq[i][v].size() != 0 && cred[i][v] > 0 && ($urandom % 5) != 0) begin
            in_valid[i] <= 1'b1;
            in_flit[i]  <= txq[i][v].pop_front();
            in_vc[i]    <= 1'(v);
            cred[i][v]--;
            sent_i = 1;
            sent++;
          end
        end
        for (int v = 0; v < NV; v++) if (credit_out[i][v]) cred[i][v]++;
      end
    end
  end

  // outputs
  always @(posedge clk) begin
    credit_in <= '0;
    if (rst_n) begin
      for (int o = 0; o < NP; o++) begin
        for (int v = 0; v < NV; v++)
          if (cred_due[o][v].size() != 0 && cred_due[o][v][0] <= cyc) begin
            automatic int d = cred_due[o][v].pop_front();
            credit_in[o][v] <= 1'b1;
          end
        if (out_valid[o]) begin
          automatic flit_t f = out_flit[o];
          automatic int v = int'(out_vc[o]);
          automatic int i, p;
          cred_due[o][v].push_back(cyc + 1 + ($urandom % 3));
          rcvd++;
          if (is_head(f.kind)) begin
            i = int'(f.data[31:0]);       // head payload low bits carry the input
            p = int'(f.data[63:32]);
          end else begin
            i = int'(f.data[127:96]);
            p = int'(f.data[63:32]);
          end
          checks++;
          if (is_head(f.kind)) begin
            if (ocur[o][v] != -1) fail("head interleaved into a packet on an output VC");
            if (exp_out[i][v].size() == 0 || exp_out[i][v][0] != o) fail($sformatf("packet of input %0d vc %0d on wrong output %0d", i, v, o));
            if (f.data[FLIT_W-ROUTE_W +: 3] != 3'(o + 1) % 5) fail("route not shifted");
            ocur[o][v] = i * NV + v;
            got_w[i][v] = 0;
          end else begin
            if (ocur[o][v] != i * NV + v) fail("body flit of another packet");
            if (f.data !== body(i, v, p, got_w[i][v])) fail("body order");
            got_w[i][v]++;
          end
          if (is_tail(f.kind)) begin
            if (got_w[i][v] != exp_len[i][v][0]) fail("packet length");
            void'(exp_out[i][v].pop_front());
            void'(exp_len[i][v].pop_front());
            ocur[o][v] = -1;
          end
        end
      end
    end
  end

  // contention: two inputs requesting one output in the same cycle
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++) begin
      automatic int r = 0;
      for (int i = 0; i < NP; i++) if (dut.req[i][o]) r++;
      if (r > 1) n_contention++;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    total = 0;
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NV; v++) begin
        cred[i][v] = DEPTH; ocur[i][v] = -1; got_w[i][v] = 0;
        for (int p = 0; p < PKTS; p++) begin
          automatic int o = (i + p * 3 + v + $urandom % 2) % NP;
          automatic int len = $urandom % 6;       // body flits after the head
          automatic hdr_t h = '0;
          automatic flit_t f;
          h.route = {21'($urandom), 3'(o)};
          h.route[5:3] = 3'((o + 1) % 5);          // second entry, checked after the shift
          f.data = h;
          f.data[31:0] = 32'(i);
          f.data[63:32] = 32'(p);
          f.kind = (len == 0) ? FL_SINGLE : FL_HEAD;
          f.chk = '0;
          txq[i][v].push_back(f);
          for (int w = 0; w < len; w++) begin
            f.kind = (w == len - 1) ? FL_TAIL : FL_BODY;
            f.data = body(i, v, p, w);
            txq[i][v].push_back(f);
          end
          exp_out[i][v].push_back(o);
          exp_len[i][v].push_back(len);
          total += len + 1;
        end
      end
    for (int i = 0; i < NP; i++) in_flit[i] = '0;
    in_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (rcvd < total && cyc < 100000) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (rcvd != total) fail($sformatf("received %0d of %0d flits", rcvd, total));
    for (int i = 0; i < NP; i++)
      for (int v = 0; v < NV; v++) begin
        checks++;
        if (exp_out[i][v].size() != 0) fail("packets missing");
        if (cred[i][v] != DEPTH) fail("credits not all returned");
      end
    checks++;
    if (n_contention == 0) fail("no output contention exercised");
    $display("mechanisms: flits=%0d contention_cycles=%0d cycles=%0d", rcvd, n_contention, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
