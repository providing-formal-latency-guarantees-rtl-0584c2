// crc16_acc: packet check-code accumulator used by every protocol engine to
// generate (sender) or verify (receiver) the CRC carried on the last flit of a
// packet, so that corrupt packets are detected and discarded.
//
// One 128-bit word is folded in per valid cycle. `first` marks the head flit:
// the accumulator restarts from 0xFFFF and the route field of that word is
// masked, because routers rewrite it in flight. `crc_next` is combinational
// and already includes the current word, so a sender can put it on the tail
// flit it is sending and a receiver can compare it with the tail's check field
// in the same cycle. `crc_q` holds the value after the last accepted word.
// The use of a CRC follows the described system; the CRC-16-CCITT polynomial
// and the masking are this design's choice.
module crc16_acc
  import arq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic              first,
  input  logic [FLIT_W-1:0] data,
  output logic [CHK_W-1:0]  crc_next,
  output logic [CHK_W-1:0]  crc_q
);

  always_comb begin
    crc_next = crc16_word(first ? 16'hFFFF : crc_q, first ? mask_route(data) : data);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc_q <= 16'hFFFF;
    else if (valid) crc_q <= crc_next;
  end

endmodule
