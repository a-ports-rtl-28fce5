// tb_inorder_buffering: checks that extra A-Port buffering changes only the
// simulation speed, never the simulated behaviour.
//
// Two copies of the 5-stage pipeline model run the same programs from the
// same inputs: one with the minimum buffering (K = 1 extra slot per port),
// one with K = 4. For each program both must retire BREAK after the same
// number of model cycles in every module, with the same retired-instruction
// count and the same data-memory contents, and both must match values
// computed here. The FPGA cycles each copy needed are printed, together with
// how far the larger buffers let modules slip (largest element count seen).
//
// That the model's results do not depend on buffering follows from the
// published A-Port rules; the published evaluation found that extra
// buffering does not speed up a 5-stage pipeline, and this testbench reports
// the ratio rather than requiring a value. The programs (recursive Towers of
// Hanoi, recursive quick sort) and the K = 4 size are this testbench's own
// choices. Stimulus is driven at the falling edge; a watchdog bounds the run.
module tb_inorder_buffering;
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
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shared inputs
  sim_mode_t   mode;
  logic        step, imem_we, dmem_en, dmem_we;
  logic [9:0]  imem_waddr, dmem_addr;
  logic [31:0] imem_wdata, dmem_wdata;
  // per-copy outputs: index 0 = K 1, index 1 = K 4
  logic [31:0] dmem_rdata [2], instret [2];
  logic        halted [2], quiesced [2], ev_r [2], ev_m [2], ev_s [2];
  logic [4:0]  cycle_done [2];
  logic [5:0]  heavy [2], light [2], full [2];

  inorder_model #(.K(1)) u_k1 (
    .clk, .rst_n, .mode, .step, .imem_we, .imem_waddr, .imem_wdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata(dmem_rdata[0]),
    .halted(halted[0]), .instret(instret[0]), .cycle_done(cycle_done[0]),
    .quiesced(quiesced[0]), .port_heavy(heavy[0]), .port_light(light[0]), .port_full(full[0]),
    .ev_replay(ev_r[0]), .ev_mispredict(ev_m[0]), .ev_squash(ev_s[0]));
  inorder_model #(.K(4)) u_k4 (
    .clk, .rst_n, .mode, .step, .imem_we, .imem_waddr, .imem_wdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata(dmem_rdata[1]),
    .halted(halted[1]), .instret(instret[1]), .cycle_done(cycle_done[1]),
    .quiesced(quiesced[1]), .port_heavy(heavy[1]), .port_light(light[1]), .port_full(full[1]),
    .ev_replay(ev_r[1]), .ev_mispredict(ev_m[1]), .ev_squash(ev_s[1]));

  // model cycles per module and the FPGA cycle at which each copy halted
  longint mcyc [2][5], mcyc_at_halt [2][5], fpga, fpga_at_halt [2];
  int max_heavy_ports [2];
  logic halted_q [2];
  always @(negedge clk) begin
    if (!rst_n) begin
      fpga = 0;
      for (int c = 0; c < 2; c++) begin
        halted_q[c] = 1'b0;
        for (int i = 0; i < 5; i++) mcyc[c][i] = 0;
      end
    end else begin
      fpga++;
      for (int c = 0; c < 2; c++) begin
        for (int i = 0; i < 5; i++) if (cycle_done[c][i]) mcyc[c][i]++;
        if ($countones(heavy[c]) > max_heavy_ports[c]) max_heavy_ports[c] = $countones(heavy[c]);
        if (halted[c] && !halted_q[c]) begin
          fpga_at_halt[c] = fpga;
          for (int i = 0; i < 5; i++) mcyc_at_halt[c][i] = mcyc[c][i];
        end
        halted_q[c] = halted[c];
      end
    end
  end

  task automatic load(prog_t p);
    rst_n = 1'b0;
    mode = MODE_RUN;
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 10'(i); imem_wdata = p[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
  endtask

  task automatic dmem_write(int byte_addr, logic [31:0] v);
    @(negedge clk);
    dmem_en = 1'b1; dmem_we = 1'b1; dmem_addr = 10'(byte_addr / 4); dmem_wdata = v;
    @(negedge clk);
    dmem_en = 1'b0; dmem_we = 1'b0;
  endtask

  task automatic dmem_read(int byte_addr, output logic [31:0] v0, output logic [31:0] v1);
    @(negedge clk);
    dmem_en = 1'b1; dmem_we = 1'b0; dmem_addr = 10'(byte_addr / 4);
    @(negedge clk);
    dmem_en = 1'b0;
    v0 = dmem_rdata[0]; v1 = dmem_rdata[1];
  endtask

  task automatic run_both(string name);
    int t = 0;
    @(negedge clk) rst_n = 1'b1;
    while (!(halted[0] && halted[1]) && t < 200_000) begin @(negedge clk); t++; end
    check(halted[0] && halted[1], {name, ": both copies reach BREAK"});
    // let the slower copy settle, then stop both in a balanced state
    mode = MODE_RESYNC;
    t = 0;
    while (!(quiesced[0] && quiesced[1]) && t < 1000) begin @(negedge clk); t++; end
    check(quiesced[0] && quiesced[1], {name, ": both copies quiesce"});
    check(instret[0] == instret[1], $sformatf("%s: retired %0d vs %0d", name, instret[0], instret[1]));
    // Only the write-back module's model cycle is a property of the target:
    // at the FPGA moment BREAK retires, the other modules may have slipped
    // ahead by amounts that depend on the buffering.
    check(mcyc_at_halt[0][4] == mcyc_at_halt[1][4],
          $sformatf("%s: BREAK retired in model cycle %0d vs %0d", name,
                    mcyc_at_halt[0][4], mcyc_at_halt[1][4]));
    $display("%s: K=1 %0d FPGA cycles, K=4 %0d FPGA cycles for %0d model cycles (speedup %0.3f)",
             name, fpga_at_halt[0], fpga_at_halt[1], mcyc_at_halt[0][4],
             real'(fpga_at_halt[0]) / real'(fpga_at_halt[1]));
  endtask

  logic [31:0] v0, v1;
  initial begin
    rst_n = 1'b0; mode = MODE_RUN; step = 1'b0;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    dmem_en = 1'b0; dmem_we = 1'b0; dmem_addr = '0; dmem_wdata = '0;
    max_heavy_ports = '{0, 0};
    repeat (2) @(negedge clk);

    // ---- towers, 4 discs ----
    begin
      int moves [$];
      load(prog_towers(4));
      hanoi_ref(4, 1, 3, 2, moves);
      run_both("towers");
      for (int k = 0; k < moves.size(); k++) begin
        dmem_read(1024 + 4 * k, v0, v1);
        check(v0 == 32'(moves[k]) && v1 == 32'(moves[k]), $sformatf("towers: move %0d", k));
      end
    end

    // ---- quick sort, 16 words ----
    begin
      int av [$];
      int tmp;
      load(prog_qsort(16));
      for (int i = 0; i < 16; i++) begin
        av.push_back(int'($urandom_range(0, 500)) - 250);
        dmem_write(4 * i, 32'(av[i]));
      end
      // signed insertion sort for the expected result
      for (int i = 1; i < 16; i++)
        for (int j = i; j > 0 && av[j] < av[j-1]; j--) begin
          tmp = av[j]; av[j] = av[j-1]; av[j-1] = tmp;
        end
      run_both("qsort");
      for (int i = 0; i < 16; i++) begin
        dmem_read(4 * i, v0, v1);
        check(v0 == 32'(av[i]) && v1 == 32'(av[i]), $sformatf("qsort: A[%0d] = %0d / %0d expected %0d", i, int'(v0), int'(v1), av[i]));
      end
    end

    $display("most ports heavy at once: K=1 %0d, K=4 %0d", max_heavy_ports[0], max_heavy_ports[1]);
    check(max_heavy_ports[1] > 0, "larger buffers were used (some port heavy)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void hanoi_ref(int n, int from, int to, int via, ref int moves [$]);
    if (n == 0) return;
    hanoi_ref(n - 1, from, via, to, moves);
    moves.push_back(from * 16 + to);
    hanoi_ref(n - 1, via, to, from, moves);
  endfunction
endmodule
