// noc_mesh: ROWS x COLS 2D mesh of noc_router instances (3 x 4 in the
// described system). Node n = row * COLS + column sits at row n / COLS,
// column n % COLS, row 0 being the northern edge. Neighbouring routers are
// joined by a link in each direction (flit, VC number and valid forward,
// one credit wire per VC backward). Ports on the mesh edge are left idle.
// Each router's local port is brought out for a network interface: inj_* is
// the flit stream into the network with its returned credits, ej_* the flit
// stream out of the network with the credits the interface gives back.
// Topology and size follow the described network; everything about the
// link signalling is this design's choice.
module noc_mesh
  import arq_pkg::*;
#(
  parameter int ROWS  = 3,
  parameter int COLS  = 4,
  parameter int DEPTH = 4,
  parameter int N     = ROWS * COLS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         inj_valid,
  input  flit_t                inj_flit [N],
  input  logic [N-1:0]         inj_vc,
  output logic [N-1:0][NVC-1:0] inj_credit,
  output logic [N-1:0]         ej_valid,
  output flit_t                ej_flit [N],
  output logic [N-1:0]         ej_vc,
  input  logic [N-1:0][NVC-1:0] ej_credit
);

  logic [4:0]          r_in_valid   [N];
  flit_t               r_in_flit    [N][5];
  logic [4:0][0:0]     r_in_vc      [N];
  logic [4:0][NVC-1:0] r_credit_out [N];
  logic [4:0]          r_out_valid  [N];
  flit_t               r_out_flit   [N][5];
  logic [4:0][0:0]     r_out_vc     [N];
  logic [4:0][NVC-1:0] r_credit_in  [N];

  // neighbour of node n through port p, or -1 at the edge
  function automatic int nb(input int n, input int p);
    int r, c;
    r = n / COLS;
    c = n % COLS;
    case (p)
      1:       return (r > 0)        ? n - COLS : -1;
      2:       return (c < COLS - 1) ? n + 1    : -1;
      3:       return (r < ROWS - 1) ? n + COLS : -1;
      4:       return (c > 0)        ? n - 1    : -1;
      default: return -1;
    endcase
  endfunction

  // port of the neighbour that faces back
  function automatic int opp(input int p);
    case (p)
      1:       return 3;
      2:       return 4;
      3:       return 1;
      4:       return 2;
      default: return 0;
    endcase
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    // local port
    assign r_in_valid[n][0]  = inj_valid[n];
    assign r_in_flit[n][0]   = inj_flit[n];
    assign r_in_vc[n][0]     = inj_vc[n];
    assign inj_credit[n]     = r_credit_out[n][0];
    assign ej_valid[n]       = r_out_valid[n][0];
    assign ej_flit[n]        = r_out_flit[n][0];
    assign ej_vc[n]          = r_out_vc[n][0];
    assign r_credit_in[n][0] = ej_credit[n];

    for (genvar p = 1; p < 5; p++) begin : g_port
      if (nb(n, p) >= 0) begin : g_link
        assign r_in_valid[n][p]  = r_out_valid[nb(n, p)][opp(p)];
        assign r_in_flit[n][p]   = r_out_flit[nb(n, p)][opp(p)];
        assign r_in_vc[n][p]     = r_out_vc[nb(n, p)][opp(p)];
        assign r_credit_in[n][p] = r_credit_out[nb(n, p)][opp(p)];
      end else begin : g_edge
        assign r_in_valid[n][p]  = 1'b0;
        assign r_in_flit[n][p]   = '0;
        assign r_in_vc[n][p]     = '0;
        assign r_credit_in[n][p] = '0;
      end
    end

    noc_router #(.NP(5), .NV(NVC), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .in_valid  (r_in_valid[n]),
      .in_flit   (r_in_flit[n]),
      .in_vc     (r_in_vc[n]),
      .credit_out(r_credit_out[n]),
      .out_valid (r_out_valid[n]),
      .out_flit  (r_out_flit[n]),
      .out_vc    (r_out_vc[n]),
      .credit_in (r_credit_in[n])
    );
  end

endmodule
