// tb_local_mem: checks the local memory. Words are written through the tile
// port and the protocol write port, then read back through the pipelined
// read port; every read must return the right word exactly LAT cycles after
// its request, with back-to-back requests streaming one word per cycle.
module tb_local_mem;
  localparam int WORDS = 64, W = 128, LAT = 6, AW = 6;

  logic clk = 0, rst_n = 0;
  logic rd_en, rd_valid, wr_en, t_en, t_we;
  logic [AW-1:0] rd_addr, wr_addr, t_addr;
  logic [W-1:0] rd_data, wr_data, t_wdata, t_rdata;
  logic [W-1:0] model [WORDS];
  int checks = 0, failures = 0;
  int cyc = 0;
  int req_cyc [$];
  logic [AW-1:0] req_addr [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  local_mem #(.WORDS(WORDS), .W(W), .LAT(LAT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read checker: compares every returned word with the model and the latency
  always @(posedge clk) if (rst_n && rd_valid) begin
    automatic int c = req_cyc.pop_front();
    automatic logic [AW-1:0] a = req_addr.pop_front();
    checks++;
    if (rd_data !== model[a] || (cyc - c) != LAT) begin
      failures++;
      $display("read addr %0d: data %h exp %h, latency %0d", a, rd_data, model[a], cyc - c);
    end
  end

  initial begin
    rd_en = 0; wr_en = 0; t_en = 0; t_we = 0;
    rd_addr = 0; wr_addr = 0; t_addr = 0; wr_data = 0; t_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill: even addresses by tile port, odd by write port
    for (int a = 0; a < WORDS; a += 2) begin
      @(negedge clk);
      t_en = 1; t_we = 1; t_addr = AW'(a); t_wdata = {$urandom, $urandom, $urandom, $urandom};
      wr_en = 1; wr_addr = AW'(a + 1); wr_data = {$urandom, $urandom, $urandom, $urandom};
      model[a] = t_wdata; model[a+1] = wr_data;
    end
    @(negedge clk);
    t_en = 0; t_we = 0; wr_en = 0;
    // tile port reads
    for (int a = 0; a < WORDS; a += 7) begin
      @(negedge clk);
      t_en = 1; t_addr = AW'(a);
      @(negedge clk);
      t_en = 0;
      checks++;
      if (t_rdata !== model[a]) begin failures++; $display("tile read %0d wrong", a); end
    end
    // streaming reads
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      rd_en = ($urandom % 4) != 0;
      rd_addr = AW'($urandom);
      if (rd_en) begin req_cyc.push_back(cyc + 1); req_addr.push_back(rd_addr); end
    end
    @(negedge clk);
    rd_en = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (req_cyc.size() != 0) begin failures++; $display("%0d reads never returned", req_cyc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
