// noc_router: 5-port wormhole router with virtual-channel flow control,
// source routing and iSLIP switch arbitration, as used by the 2D-mesh network
// that carries the ARQ traffic.
//
// Each input port has one FIFO of DEPTH flits per virtual channel. A head flit
// names its output port in route[2:0]; the router shifts the route by one
// entry as the head leaves, so the next router finds its own entry there.
// Wormhole switching: the head flit locks the output VC (the same VC number
// as the input) until the tail flit has passed; body flits follow the path
// recorded for their input VC. Credit-based flow control: a flit is sent only
// when the downstream buffer of its VC has room; every flit leaving an input
// FIFO returns one credit upstream.
// Switch allocation is one iteration of iSLIP: every input requests all
// outputs it has an eligible flit for, every output grants one requesting
// input round-robin, every input accepts one grant round-robin, and the
// round-robin pointers move only on accepted grants. Within an input, the VC
// that goes is chosen round-robin too.
// Timing: a flit written into an input FIFO can leave the next cycle; output
// flits are registered, so a hop takes 2 cycles. Ports: 0 local, 1 north,
// 2 east, 3 south, 4 west. Wormhole switching, VC flow control, source routing
// and SLIP arbitration follow the described network; buffer depth, number of
// VCs, the credit protocol and pipeline are this design's choices.
module noc_router
  import arq_pkg::*;
#(
  parameter int NP    = 5,
  parameter int NV    = NVC,
  parameter int DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input links
  input  logic [NP-1:0]          in_valid,
  input  flit_t                  in_flit [NP],
  input  logic [NP-1:0][$clog2(NV)-1:0] in_vc,
  output logic [NP-1:0][NV-1:0]  credit_out,
  // output links
  output logic [NP-1:0]          out_valid,
  output flit_t                  out_flit [NP],
  output logic [NP-1:0][$clog2(NV)-1:0] out_vc,
  input  logic [NP-1:0][NV-1:0]  credit_in
);

  localparam int VW = $clog2(NV);
  localparam int DW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int PW = $clog2(NP);

  // input FIFOs
  flit_t           fbuf [NP][NV][DEPTH];
  logic [DW-1:0]   wp [NP][NV];
  logic [DW-1:0]   rp [NP][NV];
  logic [CW-1:0]   cnt [NP][NV];

  // per input VC: output port of the packet in progress
  logic [PW-1:0]   cur_out [NP][NV];
  // per output VC: lock and owner
  logic            olock  [NP][NV];
  logic [PW-1:0]   oowner [NP][NV];
  // credits for the downstream buffers
  logic [CW-1:0]   credit [NP][NV];

  // arbitration pointers
  logic [PW-1:0]   gptr [NP];
  logic [PW-1:0]   aptr [NP];
  logic [VW-1:0]   vptr [NP];

  flit_t           front  [NP][NV];
  logic [PW-1:0]   target [NP][NV];
  logic            elig   [NP][NV];
  logic [NP-1:0]   req    [NP];     // req[i][o]
  logic [NP-1:0]   gnt    [NP];     // gnt[o][i]
  logic            acc_v  [NP];
  logic [PW-1:0]   acc_o  [NP];
  logic [VW-1:0]   acc_vc [NP];

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      req[i] = '0;
      for (int v = 0; v < NV; v++) begin
        front[i][v]  = fbuf[i][v][rp[i][v]];
        target[i][v] = is_head(front[i][v].kind) ? PW'(front[i][v].data[FLIT_W-ROUTE_W +: 3])
                                                 : cur_out[i][v];
        elig[i][v]   = (cnt[i][v] != 0) && (credit[target[i][v]][v] != 0) &&
                       (is_head(front[i][v].kind) ? !olock[target[i][v]][v]
                                                  : (olock[target[i][v]][v] &&
                                                     oowner[target[i][v]][v] == PW'(i)));
        if (elig[i][v]) req[i][target[i][v]] = 1'b1;
      end
    end
    // grant phase: each output picks one input, round-robin from gptr
    for (int o = 0; o < NP; o++) begin
      gnt[o] = '0;
      for (int k = 0; k < NP; k++) begin
        automatic int i = (int'(gptr[o]) + k) % NP;
        if (gnt[o] == '0 && req[i][o]) gnt[o][i] = 1'b1;
      end
    end
    // accept phase: each input picks one granting output, round-robin from aptr
    for (int i = 0; i < NP; i++) begin
      acc_v[i]  = 1'b0;
      acc_o[i]  = '0;
      acc_vc[i] = '0;
      for (int k = 0; k < NP; k++) begin
        automatic int o = (int'(aptr[i]) + k) % NP;
        if (!acc_v[i] && gnt[o][i]) begin
          acc_v[i] = 1'b1;
          acc_o[i] = PW'(o);
        end
      end
      // VC of this input that goes to the accepted output
      if (acc_v[i]) begin
        automatic logic found = 1'b0;
        for (int k = 0; k < NV; k++) begin
          automatic int v = (int'(vptr[i]) + k) % NV;
          if (!found && elig[i][v] && target[i][v] == acc_o[i]) begin
            found     = 1'b1;
            acc_vc[i] = VW'(v);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) begin
        for (int v = 0; v < NV; v++) begin
          wp[i][v]      <= '0;
          rp[i][v]      <= '0;
          cnt[i][v]     <= '0;
          cur_out[i][v] <= '0;
          olock[i][v]   <= 1'b0;
          oowner[i][v]  <= '0;
          credit[i][v]  <= CW'(DEPTH);
        end
        gptr[i]      <= '0;
        aptr[i]      <= '0;
        vptr[i]      <= '0;
        out_valid[i] <= 1'b0;
        out_flit[i]  <= '0;
        out_vc[i]    <= '0;
      end
      credit_out <= '0;
    end else begin
      credit_out <= '0;
      out_valid  <= '0;
      for (int i = 0; i < NP; i++) begin
        for (int v = 0; v < NV; v++) begin
          automatic logic push = in_valid[i] && (in_vc[i] == VW'(v));
          automatic logic pop  = acc_v[i] && (acc_vc[i] == VW'(v));
          automatic logic cret = credit_in[i][v];
          automatic logic cuse = 1'b0;
          for (int j = 0; j < NP; j++)
            if (acc_v[j] && acc_o[j] == PW'(i) && acc_vc[j] == VW'(v)) cuse = 1'b1;
          if (push) begin
            fbuf[i][v][wp[i][v]] <= in_flit[i];
            wp[i][v] <= wp[i][v] + 1'b1;
          end
          if (pop) rp[i][v] <= rp[i][v] + 1'b1;
          cnt[i][v]    <= cnt[i][v] + CW'(push) - CW'(pop);
          credit[i][v] <= credit[i][v] + CW'(cret) - CW'(cuse);
        end
      end
      for (int i = 0; i < NP; i++) begin
        if (acc_v[i]) begin
          automatic flit_t f = front[i][acc_vc[i]];
          automatic int    o = int'(acc_o[i]);
          credit_out[i][acc_vc[i]] <= 1'b1;
          if (is_head(f.kind)) begin
            f.data[FLIT_W-1 -: ROUTE_W] = f.data[FLIT_W-1 -: ROUTE_W] >> 3;
            cur_out[i][acc_vc[i]] <= acc_o[i];
          end
          if (is_head(f.kind) && !is_tail(f.kind)) begin
            olock[o][acc_vc[i]]  <= 1'b1;
            oowner[o][acc_vc[i]] <= PW'(i);
          end
          if (is_tail(f.kind)) olock[o][acc_vc[i]] <= 1'b0;
          out_valid[o] <= 1'b1;
          out_flit[o]  <= f;
          out_vc[o]    <= acc_vc[i];
          // iSLIP pointer update: one past the accepted grant
          gptr[o] <= PW'((i + 1) % NP);
          aptr[i] <= PW'((o + 1) % NP);
          vptr[i] <= VW'((int'(acc_vc[i]) + 1) % NV);
        end
      end
    end
  end

  for (genvar i = 0; i < NP; i++) begin : g_chk
    for (genvar v = 0; v < NV; v++) begin : g_vc
      a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
        !(in_valid[i] && in_vc[i] == VW'(v) && cnt[i][v] == CW'(DEPTH)));
    end
  end

endmodule
