// tb_crc16_acc: checks the packet CRC accumulator against a byte-wise
// CRC-16-CCITT reference (polynomial 0x1021, initial value 0xFFFF) written
// independently of the design. The reference itself is first checked with
// the standard test string "123456789" (CRC 0x29B1). Then random packets of
// 1..9 words are folded in, the head word with its route field cleared.
module tb_crc16_acc;
  import arq_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid, first;
  logic [FLIT_W-1:0] data;
  logic [CHK_W-1:0] crc_next, crc_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc16_acc dut (.*);

  // byte-wise reference
  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    logic [15:0] x;
    x = c ^ {b, 8'h00};
    for (int k = 0; k < 8; k++) x = x[15] ? ((x << 1) ^ 16'h1021) : (x << 1);
    return x;
  endfunction

  function automatic logic [15:0] ref_word(input logic [15:0] c, input logic [127:0] w);
    logic [15:0] x;
    x = c;
    for (int b = 15; b >= 0; b--) x = ref_byte(x, w[8*b +: 8]);
    return x;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    logic [71:0] s;
    logic [127:0] w;
    int n;
    s = "123456789";
    r = 16'hFFFF;
    for (int b = 8; b >= 0; b--) r = ref_byte(r, s[8*b +: 8]);
    checks++;
    if (r !== 16'h29B1) begin failures++; $display("reference CRC wrong %h", r); end

    valid = 0; first = 0; data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 50; p++) begin
      n = 1 + ($urandom % 9);
      r = 16'hFFFF;
      for (int i = 0; i < n; i++) begin
        w = {$urandom, $urandom, $urandom, $urandom};
        @(negedge clk);
        valid = 1; first = (i == 0); data = w;
        if (i == 0) w[127 -: 24] = '0;
        r = ref_word(r, w);
        #1;
        checks++;
        if (crc_next !== r) begin
          failures++;
          $display("packet %0d word %0d: crc %h expected %h", p, i, crc_next, r);
        end
      end
      @(negedge clk);
      valid = 0;
      checks++;
      if (crc_q !== r) begin failures++; $display("crc_q %h expected %h", crc_q, r); end
      // idle cycles must not change the stored value
      @(negedge clk);
      checks++;
      if (crc_q !== r) begin failures++; $display("crc_q moved while idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
