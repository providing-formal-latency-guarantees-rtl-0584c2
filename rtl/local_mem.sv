// local_mem: a node's local memory. The DMA ARQ sender streams packet data
// out of it and re-reads it when a packet has to be retransmitted, which is
// why the protocol needs no retransmission buffer; the DMA ARQ receiver writes
// arriving packet data into it.
//
// Read port: pipelined, one request per cycle, data returns LAT cycles after
// rd_en with rd_valid (LAT defaults to the 40-cycle memory access time t_mem
// used in the described evaluation). Write port: one word per cycle, always
// accepted. Tile port: single-cycle read/write access for the local processor
// (and for test benches to preload and inspect data); on a write collision at
// the same address the tile port wins. Size and port set are this design's
// choice.
module local_mem #(
  parameter int WORDS = 2048,
  parameter int W     = 128,
  parameter int LAT   = 40,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // pipelined read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [W-1:0]  rd_data,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  // tile port
  input  logic          t_en,
  input  logic          t_we,
  input  logic [AW-1:0] t_addr,
  input  logic [W-1:0]  t_wdata,
  output logic [W-1:0]  t_rdata
);

  logic [W-1:0] mem [WORDS];
  logic [W-1:0] pipe_d [LAT];
  logic [LAT-1:0] pipe_v;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (t_en && t_we) mem[t_addr] <= t_wdata;
    if (t_en) t_rdata <= mem[t_addr];
    pipe_d[0] <= mem[rd_addr];
    for (int i = 1; i < LAT; i++) pipe_d[i] <= pipe_d[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pipe_v <= '0;
    else pipe_v <= (pipe_v << 1) | LAT'(rd_en);
  end

  assign rd_valid = pipe_v[LAT-1];
  assign rd_data  = pipe_d[LAT-1];

endmodule
