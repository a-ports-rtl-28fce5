// tb_aports_top: end-to-end test of the whole design at its default sizes.
//
// Two activities run at the same time, one per model in the top:
//   * The 5-stage in-order model runs the prefix-sum program to BREAK in
//     decoupled mode, is then resynchronised (all ports balanced), single-
//     stepped, and its data memory is read back and compared with values
//     computed here. The retired-instruction count is checked too.
//   * The register-file model receives random reads and writes, one set per
//     model cycle, and its read values are compared with a reference register
//     file; each model cycle must take 4 FPGA cycles.
// Every mechanism of the design must occur at least once: scoreboard stall
// (replay), mispredict redirect, wrong-path squash, heavy / light / full
// A-Ports, quiescence after resynchronisation, a single step, and register
// reads that return the value from before a same-cycle write.
//
// The mechanisms counted are the published ones (decoupled run, resync to a
// balanced state, single step, 4 FPGA cycles per register-file model cycle); the
// program, its data and the random register traffic are this testbench's own.
// Stimulus is driven at the falling edge, and the run is bounded by a watchdog.
module tb_aports_top;
  import aports_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- in-order model signals ----
  sim_mode_t   ip_mode;
  logic        ip_step, ip_imem_we, ip_dmem_en, ip_dmem_we;
  logic [9:0]  ip_imem_waddr, ip_dmem_addr;
  logic [31:0] ip_imem_wdata, ip_dmem_wdata, ip_dmem_rdata, ip_instret;
  logic        ip_halted, ip_quiesced, ip_ev_replay, ip_ev_mispredict, ip_ev_squash;
  logic [4:0]  ip_cycle_done;
  logic [5:0]  ip_port_heavy, ip_port_light, ip_port_full;
  // ---- register-file model signals ----
  logic [4:0]  rf_rd_addr1, rf_rd_addr2, rf_wr_addr1, rf_wr_addr2;
  logic        rf_wr_en1, rf_wr_en2, rf_cc_done;
  logic [31:0] rf_wr_val1, rf_wr_val2, rf_rd_val1, rf_rd_val2, rf_cur_cc;

  aports_top dut (.*);

  // ---- mechanism counters (sampled at the falling edge) ----
  int n_replay = 0, n_mis = 0, n_squash = 0, n_heavy = 0, n_light = 0, n_full = 0;
  int n_quiesce = 0, n_step = 0, n_rbw = 0;
  longint fpga = 0, mcyc [5];
  always @(negedge clk) if (rst_n) begin
    fpga++;
    for (int i = 0; i < 5; i++) if (ip_cycle_done[i]) mcyc[i]++;
    n_replay += int'(ip_ev_replay);
    n_mis    += int'(ip_ev_mispredict);
    n_squash += int'(ip_ev_squash);
    n_heavy  += int'(|ip_port_heavy);
    n_light  += int'(|ip_port_light);
    n_full   += int'(|ip_port_full);
  end

  // ---- register-file model stimulus, runs concurrently ----
  logic [31:0] refrf [32], e1, e2;
  bit rf_finished = 0;
  int last_cc_done;
  initial begin
    rf_wr_en1 = 0; rf_wr_en2 = 0; rf_rd_addr1 = '0; rf_rd_addr2 = '0;
    rf_wr_addr1 = '0; rf_wr_addr2 = '0; rf_wr_val1 = '0; rf_wr_val2 = '0;
    for (int i = 0; i < 32; i++) refrf[i] = '0;
    wait (rst_n);
    // clear the RAM: two registers per model cycle
    for (int i = 0; i < 32; i += 2) begin
      rf_wr_en1 = 1; rf_wr_addr1 = 5'(i); rf_wr_val1 = '0;
      rf_wr_en2 = 1; rf_wr_addr2 = 5'(i + 1); rf_wr_val2 = '0;
      do @(negedge clk); while (!rf_cc_done);
      last_cc_done = int'(fpga);
      @(negedge clk);
    end
    for (int t = 0; t < 300; t++) begin
      rf_rd_addr1 = 5'($urandom); rf_rd_addr2 = 5'($urandom);
      rf_wr_en1 = 1; rf_wr_addr1 = (t % 3 == 0) ? rf_rd_addr1 : 5'($urandom);
      rf_wr_en2 = $urandom_range(0, 1) == 1;
      do rf_wr_addr2 = 5'($urandom); while (rf_wr_addr2 == rf_wr_addr1);
      rf_wr_val1 = $urandom; rf_wr_val2 = $urandom;
      e1 = refrf[rf_rd_addr1]; e2 = refrf[rf_rd_addr2];
      if (rf_wr_addr1 == rf_rd_addr1 && e1 != rf_wr_val1) n_rbw++;
      refrf[rf_wr_addr1] = rf_wr_val1;
      if (rf_wr_en2) refrf[rf_wr_addr2] = rf_wr_val2;
      do @(negedge clk); while (!rf_cc_done);
      check(int'(fpga) - last_cc_done == 4, "register-file model: 4 FPGA cycles per model cycle");
      last_cc_done = int'(fpga);
      @(negedge clk);
      check(rf_rd_val1 == e1 && rf_rd_val2 == e2, $sformatf("register-file model read %0d", t));
    end
    check(rf_cur_cc == 32'd316, $sformatf("register-file model cur_cc %0d", rf_cur_cc));
    rf_finished = 1;
  end

  // ---- in-order model stimulus ----
  logic [31:0] v, acc;
  prog_t prog;
  int n, t;
  longint mc0 [5];
  initial begin
    rst_n = 0; ip_mode = MODE_RUN; ip_step = 0;
    ip_imem_we = 0; ip_imem_waddr = '0; ip_imem_wdata = '0;
    ip_dmem_en = 0; ip_dmem_we = 0; ip_dmem_addr = '0; ip_dmem_wdata = '0;
    for (int i = 0; i < 5; i++) mcyc[i] = 0;
    n = 12;
    prog = prog_prefix(n);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      ip_imem_we = 1; ip_imem_waddr = 10'(i); ip_imem_wdata = prog[i];
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ip_imem_we = 0;
      ip_dmem_en = 1; ip_dmem_we = 1; ip_dmem_addr = 10'(i); ip_dmem_wdata = 32'(i * i + 2);
    end
    @(negedge clk);
    ip_imem_we = 0; ip_dmem_en = 0; ip_dmem_we = 0;
    rst_n = 1;
    t = 0;
    while (!ip_halted && t < 100_000) begin @(negedge clk); t++; end
    check(ip_halted, "in-order model reaches BREAK");
    check(ip_instret == 32'(prefix_instret(n)), $sformatf("retired %0d", ip_instret));
    $display("in-order model: %0d FPGA cycles for %0d WB model cycles (FMR %0.2f)",
             fpga, mcyc[4], real'(fpga) / real'(mcyc[4]));
    ip_mode = MODE_RESYNC;
    t = 0;
    while (!ip_quiesced && t < 1000) begin @(negedge clk); t++; end
    check(ip_quiesced && ip_port_heavy == 0 && ip_port_light == 0, "resynchronised, all ports balanced");
    n_quiesce += int'(ip_quiesced);
    ip_mode = MODE_STEP;
    @(negedge clk);
    for (int i = 0; i < 5; i++) mc0[i] = mcyc[i];
    ip_step = 1; @(negedge clk); ip_step = 0;
    repeat (30) @(negedge clk);
    for (int i = 0; i < 5; i++)
      check(mcyc[i] == mc0[i] + 1, $sformatf("step moves module %0d by one model cycle", i));
    n_step++;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      acc += 32'(i * i + 2);
      @(negedge clk);
      ip_dmem_en = 1; ip_dmem_we = 0; ip_dmem_addr = 10'(64 + i);
      @(negedge clk);
      ip_dmem_en = 0;
      check(ip_dmem_rdata == acc, $sformatf("prefix[%0d]=%0d expected %0d", i, ip_dmem_rdata, acc));
    end
    wait (rf_finished);
    $display("events: replay %0d mispredict %0d squash %0d heavy %0d light %0d full %0d quiesce %0d step %0d read-before-write %0d",
             n_replay, n_mis, n_squash, n_heavy, n_light, n_full, n_quiesce, n_step, n_rbw);
    check(n_replay > 0,  "scoreboard stall happened");
    check(n_mis > 0,     "mispredict redirect happened");
    check(n_squash > 0,  "squash happened");
    check(n_heavy > 0,   "heavy port seen");
    check(n_light > 0,   "light port seen");
    check(n_full > 0,    "full port seen");
    check(n_quiesce > 0, "quiescence reached");
    check(n_step > 0,    "single step done");
    check(n_rbw > 0,     "read before a same-cycle write seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
