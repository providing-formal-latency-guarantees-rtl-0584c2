// tb_workload_dma: the DMA workloads of the evaluation, run on the full
// 3 x 4 network at default parameters: transfers of 4 KB, 8 KB and 16 KB
// (32, 64 and 128 packets of 9 flits) from the memory node 0 to the
// processing nodes 6, 10 and 11, one transfer at a time, while two 64-byte
// Stop-and-Wait streams run in the background. Each size is run error-free
// and with one error on the final ACK (the worst case of the analysis:
// timeout, re-read of the last packet from memory, resend).
// Checked per transfer: data in the destination memory; error-free latency
// at most t_mem + 9 cycles per packet + 100 (the protocol adds no waiting
// inside a transfer); and an error overhead between t_out + t_mem and
// t_out + t_mem + 150 cycles, independent of the transfer length.
module tb_workload_dma;
  import arq_pkg::*;

  localparam int N = 12, AW = 11, T_MEM = 40, TOUT = 60;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] dma_start_valid, dma_start_ready, dma_tx_done, dma_rx_done;
  logic [NODE_W-1:0] dma_start_dst [N];
  logic [AW-1:0] dma_start_src_addr [N];
  logic [31:0] dma_start_dst_addr [N];
  logic [7:0] dma_start_npkts_m1 [N];
  logic [N-1:0] gen_tx_valid, gen_tx_ready, gen_rx_valid, gen_rx_ready;
  logic [NODE_W-1:0] gen_tx_dst [N];
  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] gen_tx_data [N];
  logic [NODE_W-1:0] gen_rx_src [N];
  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] gen_rx_data [N];
  logic [N-1:0] mem_en, mem_we, fault_inj;
  logic [AW-1:0] mem_addr [N];
  logic [FLIT_W-1:0] mem_wdata [N];
  logic [FLIT_W-1:0] mem_rdata [N];
  node_ev_t ev [N];

  arq_noc_top dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_done = 0, n_timeout = 0, n_gen = 0;
  bit bg_on = 0;

  always #5 clk = ~clk;

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
    if (failures >= 50) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  function automatic logic [FLIT_W-1:0] dword(input int a);
    return {32'hA11CE, 32'(a), ~32'(a), 32'(a * 5)};
  endfunction

  always @(posedge clk) begin
    cyc++;
    gen_rx_ready <= '1;
    if (rst_n) n_done += dma_tx_done[0];
    if (rst_n) n_timeout += ev[0].dma_tx_timeout;
    if (rst_n) for (int n = 0; n < N; n++) n_gen += gen_rx_valid[n];
    // background Stop-and-Wait streams 2 -> 5 and 8 -> 1, always offering
    gen_tx_valid[2] <= bg_on;
    gen_tx_valid[8] <= bg_on;
  end

  task automatic run(input int dst, input int npk, input bit with_error, output int took);
    int t0;
    @(negedge clk);
    while (!dma_start_ready[0]) @(negedge clk);
    dma_start_valid[0] = 1; dma_start_dst[0] = 4'(dst); dma_start_src_addr[0] = '0;
    dma_start_dst_addr[0] = 32'(1024); dma_start_npkts_m1[0] = 8'(npk - 1);
    if (with_error) fault_inj[0] = 1;     // corrupts the next flit ejected at node 0: the ACK
    t0 = cyc;
    @(negedge clk);
    dma_start_valid[0] = 0; fault_inj[0] = 0;
    while (n_done == 0 && cyc - t0 < 10000) @(posedge clk);
    took = cyc - t0;
    checks++;
    if (n_done != 1) fail("transfer did not finish");
    n_done = 0;
    for (int a = 0; a < 8 * npk; a++) begin
      @(negedge clk);
      mem_en[dst] = 1; mem_addr[dst] = AW'(1024 + a);
      @(negedge clk);
      mem_en[dst] = 0;
      checks++;
      if (mem_rdata[dst] !== dword(a)) fail($sformatf("data word %0d at node %0d", a, dst));
      mem_we[dst] = 1; mem_en[dst] = 1; mem_wdata[dst] = '0;   // clear for the next run
      @(negedge clk);
      mem_we[dst] = 0; mem_en[dst] = 0;
    end
  endtask

  initial begin
    #1600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_ok, t_err, to0;
    int sizes [3];
    int dsts [3];
    sizes = '{32, 64, 128};
    dsts = '{6, 10, 11};
    dma_start_valid = '0; mem_en = '0; mem_we = '0; fault_inj = '0;
    for (int n = 0; n < N; n++) begin
      dma_start_dst[n] = '0; dma_start_src_addr[n] = '0; dma_start_dst_addr[n] = '0;
      dma_start_npkts_m1[n] = '0; gen_tx_dst[n] = '0; gen_tx_data[n] = '0;
      mem_addr[n] = '0; mem_wdata[n] = '0;
    end
    gen_tx_valid = '0;
    gen_tx_dst[2] = 4'd5; gen_tx_dst[8] = 4'd1;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      mem_en[0] = 1; mem_we[0] = 1; mem_addr[0] = AW'(a); mem_wdata[0] = dword(a);
    end
    @(negedge clk);
    mem_en[0] = 0; mem_we[0] = 0;
    bg_on = 1;
    for (int i = 0; i < 3; i++) begin
      run(dsts[i], sizes[i], 0, t_ok);
      to0 = n_timeout;
      run(dsts[i], sizes[i], 1, t_err);
      $display("%0d KB transfer to node %0d: error-free %0d cycles, 1 error %0d cycles (+%0d)",
               sizes[i] / 8, dsts[i], t_ok, t_err, t_err - t_ok);
      checks++;
      if (t_ok > T_MEM + 9 * sizes[i] + 100) fail("error-free latency above bound");
      checks++;
      if (n_timeout - to0 != 1) fail("error case did not time out exactly once");
      checks++;
      if (t_err - t_ok < TOUT + T_MEM || t_err - t_ok > TOUT + T_MEM + 150)
        fail($sformatf("error overhead %0d cycles", t_err - t_ok));
    end
    bg_on = 0;
    checks++;
    if (n_gen == 0) fail("background traffic did not flow");
    $display("mechanisms: timeouts=%0d background_packets=%0d", n_timeout, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
