// tb_inorder_model: end-to-end test of the 5-stage A-Ports pipeline model.
//
// Loads six small programs (prefix sums with a call, vector add,
// shift-and-add multiply, a 3-point median filter, recursive Towers of Hanoi
// and recursive quick sort), runs each in decoupled mode until BREAK retires,
// then resynchronises the model, single-steps it and reads the data memory
// back. Results are compared with values computed here. Along the way it
// checks that
//   * the retired-instruction count matches the program's path length,
//   * adjacent modules never slip apart further than their A-Port allows
//     (consumer at most L=1 model cycles ahead, producer at most K+1),
//   * resynchronisation ends with every port balanced, and one step moves
//     every module by exactly one model cycle,
//   * each mechanism happened: scoreboard stall (replay), mispredict
//     redirect, squash, heavy / light / full ports, quiescence, stepping.
// It also prints each module's FPGA-to-model cycle ratio.
//
// The five-module pipeline, its latency-1 ports and the resync and step modes
// follow the published design; the programs, the epoch and replay mechanisms
// and the expected FMR range are this design's own. Stimulus is driven at the
// falling edge.
module tb_inorder_model;
  import aports_pkg::*;
  import tb_asm_pkg::*;

  localparam int unsigned K = 1;
  localparam int unsigned L = 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  sim_mode_t   mode;
  logic        step;
  logic        imem_we;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  logic        dmem_en, dmem_we;
  logic [9:0]  dmem_addr;
  logic [31:0] dmem_wdata, dmem_rdata;
  logic        halted, quiesced, ev_replay, ev_mispredict, ev_squash;
  logic [31:0] instret;
  logic [4:0]  cycle_done;
  logic [5:0]  port_heavy, port_light, port_full;

  inorder_model dut (
    .clk, .rst_n, .mode, .step, .imem_we, .imem_waddr, .imem_wdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .halted, .instret, .cycle_done, .quiesced, .port_heavy, .port_light, .port_full,
    .ev_replay, .ev_mispredict, .ev_squash
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- event counters ----------------
  longint fpga_cyc;
  longint mcyc [5];         // model cycles completed per module (writes)
  int n_replay = 0, n_mispredict = 0, n_squash = 0, n_quiesce = 0, n_step = 0;
  int n_heavy = 0, n_light = 0, n_full = 0, slip_viol = 0;

  // ports: producer, consumer module index (0 FET .. 4 WB)
  int prod [6] = '{0, 1, 2, 3, 2, 4};
  int cons [6] = '{1, 2, 3, 4, 0, 1};

  always @(posedge clk) begin
    if (!rst_n) begin
      fpga_cyc <= 0;
      for (int i = 0; i < 5; i++) mcyc[i] <= 0;
    end else begin
      fpga_cyc <= fpga_cyc + 1;
      for (int i = 0; i < 5; i++) if (cycle_done[i]) mcyc[i] <= mcyc[i] + 1;
      n_replay     += int'(ev_replay);
      n_mispredict += int'(ev_mispredict);
      n_squash     += int'(ev_squash);
      n_heavy      += int'(|port_heavy);
      n_light      += int'(|port_light);
      n_full       += int'(|port_full);
      for (int p = 0; p < 6; p++) begin
        if (mcyc[cons[p]] - mcyc[prod[p]] > longint'(L) ||
            mcyc[prod[p]] - mcyc[cons[p]] > longint'(K + 1))
          slip_viol++;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  task automatic load_program(prog_t p);
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

  task automatic dmem_read(int byte_addr, output logic [31:0] v);
    @(negedge clk);
    dmem_en = 1'b1; dmem_we = 1'b0; dmem_addr = 10'(byte_addr / 4);
    @(negedge clk);
    dmem_en = 1'b0;
    v = dmem_rdata;
  endtask

  // Run the loaded program to BREAK, then resync, step and pause.
  task automatic run_to_halt(string name, int exp_instret);
    longint c0, m_before [5];
    int t;
    mode = MODE_RUN;
    step = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    t = 0;
    while (!halted && t < 1_000_000) begin @(posedge clk); t++; end
    check(halted, {name, ": program reaches BREAK"});
    @(negedge clk);
    check(instret == 32'(exp_instret),
          $sformatf("%s: retired %0d instructions, expected %0d", name, instret, exp_instret));
    $display("%s: %0d FPGA cycles, model cycles FET %0d DEC %0d EXE %0d MEM %0d WB %0d, FMR(WB) %0.2f",
             name, fpga_cyc, mcyc[0], mcyc[1], mcyc[2], mcyc[3], mcyc[4],
             real'(fpga_cyc) / real'(mcyc[4]));
    // resynchronise
    mode = MODE_RESYNC;
    t = 0;
    do begin @(posedge clk); t++; end while (!quiesced && t < 1000);
    @(negedge clk);
    check(quiesced, {name, ": resynchronisation quiesces"});
    if (quiesced) n_quiesce++;
    check(port_heavy == '0 && port_light == '0, {name, ": all ports balanced after resync"});
    c0 = mcyc[0];
    repeat (20) @(posedge clk);
    @(negedge clk);
    check(mcyc[0] == c0, {name, ": quiesced model stays put"});
    for (int i = 0; i < 5; i++)
      check(mcyc[i] == mcyc[0], $sformatf("%s: module %0d on the same model cycle", name, i));
    // single step
    mode = MODE_STEP;
    @(negedge clk);
    for (int i = 0; i < 5; i++) m_before[i] = mcyc[i];
    step = 1'b1;
    @(negedge clk);
    step = 1'b0;
    repeat (40) @(negedge clk);
    for (int i = 0; i < 5; i++)
      check(mcyc[i] == m_before[i] + 1, $sformatf("%s: step advances module %0d by one", name, i));
    check(quiesced, {name, ": quiesced after step"});
    n_step++;
  endtask

  task automatic reset_model();
    @(negedge clk);
    rst_n = 1'b0;
    mode = MODE_RUN;
    repeat (2) @(negedge clk);
  endtask

  // ---------------- reference models of the longer programs ----------------
  // Each returns the result the program must leave in memory and the number
  // of instructions it retires, following the program's own control flow.
  function automatic int median_ref(int a [], ref int med []);
    int len = 2 + 1;
    int x, y, z, t;
    med = new[a.size()];
    for (int i = 1; i < a.size() - 1; i++) begin
      x = a[i-1]; y = a[i]; z = a[i+1];
      len += 5 + 2 + 2 + 3;
      if (y < x) begin t = x; x = y; y = t; len += 3; end
      if (z < y) begin y = z; len += 1; end
      if (y < x) begin y = x; len += 1; end
      med[i] = y;
    end
    return len;
  endfunction

  function automatic void hanoi_ref(int n, int from, int to, int via, ref int moves [$]);
    if (n == 0) return;
    hanoi_ref(n - 1, from, via, to, moves);
    moves.push_back(from * 16 + to);
    hanoi_ref(n - 1, via, to, from, moves);
  endfunction

  function automatic int qsort_ref(ref int a [], input int lo, input int hi);
    int len = 2, pv, i, t, pos;
    if (!(lo < hi)) return len + 1;
    len += 7;
    pv = a[hi]; i = lo;
    for (int j = lo; j != hi; j++) begin
      len += 4 + 2;
      if (a[j] < pv) begin t = a[i]; a[i] = a[j]; a[j] = t; i++; len += 4; end
    end
    len += 1 + 6;
    t = a[i]; a[i] = pv; a[hi] = t;
    pos = i;
    len += qsort_ref(a, lo, pos - 1);
    len += 4;
    len += qsort_ref(a, pos + 1, hi);
    return len + 3;
  endfunction

  // ---------------- stimulus ----------------
  logic [31:0] v, acc, a, b;
  int n;
  initial begin
    rst_n = 1'b0; mode = MODE_RUN; step = 1'b0;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    dmem_en = 1'b0; dmem_we = 1'b0; dmem_addr = '0; dmem_wdata = '0;
    repeat (2) @(negedge clk);

    // ---- prefix sums ----
    n = 10;
    load_program(prog_prefix(n));
    for (int i = 0; i < n; i++) dmem_write(4 * i, 32'(3 * i + 1));
    run_to_halt("prefix", prefix_instret(n));
    acc = 0;
    for (int i = 0; i < n; i++) begin
      acc += 32'(3 * i + 1);
      dmem_read(256 + 4 * i, v);
      check(v == acc, $sformatf("prefix: B[%0d]=%0d expected %0d", i, v, acc));
    end
    dmem_read(512, v);
    check(v == ((acc << 2) ^ 32'(n)), $sformatf("prefix: result %0h expected %0h", v, (acc << 2) ^ 32'(n)));

    // ---- vector add ----
    reset_model();
    n = 16;
    load_program(prog_vvadd(n));
    for (int i = 0; i < n; i++) begin
      dmem_write(4 * i, 32'(i * 7 + 5));
      dmem_write(1024 + 4 * i, 32'(1000 - 13 * i));
    end
    run_to_halt("vvadd", vvadd_instret(n));
    for (int i = 0; i < n; i++) begin
      dmem_read(2048 + 4 * i, v);
      check(v == 32'(i * 7 + 5) + 32'(1000 - 13 * i), $sformatf("vvadd: C[%0d]=%0d", i, v));
    end

    // ---- multiply ----
    reset_model();
    n = 6;
    load_program(prog_multiply(n));
    for (int i = 0; i < n; i++) begin
      dmem_write(4 * i, 32'(17 * i + 3));
      dmem_write(1024 + 4 * i, 32'(5 * i + 2));
    end
    begin
      // path length: per pair 2 loads + 1 + per bit of b (6 or 5 insts) + exit test etc.
      int len;
      len = 2 + 1;
      for (int i = 0; i < n; i++) begin
        b = 32'(5 * i + 2);
        len += 3;                       // lw, lw, addiu
        while (b != 0) begin
          len += 1 + 2 + (b[0] ? 1 : 0) + 3;  // beq, andi+beq, addu?, sll, srl, j
          b = b >> 1;
        end
        len += 1 + 3;                   // final beq, sw, addiu, bne
      end
      run_to_halt("multiply", len);
    end
    for (int i = 0; i < n; i++) begin
      dmem_read(2048 + 4 * i, v);
      a = 32'(17 * i + 3); b = 32'(5 * i + 2);
      check(v == a * b, $sformatf("multiply: C[%0d]=%0d expected %0d", i, v, a * b));
    end

    // ---- median filter ----
    reset_model();
    n = 20;
    load_program(prog_median(n));
    begin
      int av [], med [];
      int len;
      av = new[n];
      for (int i = 0; i < n; i++) begin
        av[i] = int'($urandom_range(0, 2000)) - 1000;
        dmem_write(4 * i, 32'(av[i]));
      end
      len = median_ref(av, med);
      run_to_halt("median", len);
      for (int i = 1; i < n - 1; i++) begin
        dmem_read(1024 + 4 * i, v);
        check(v == 32'(med[i]), $sformatf("median: B[%0d]=%0d expected %0d", i, int'(v), med[i]));
      end
    end

    // ---- towers of Hanoi ----
    reset_model();
    n = 5;
    load_program(prog_towers(n));
    begin
      int moves [$];
      hanoi_ref(n, 1, 3, 2, moves);
      run_to_halt("towers", 9 + 26 * ((1 << n) - 1) + 2 * (1 << n));
      dmem_read(0, v);
      check(v == 32'(1024 + 4 * moves.size()), $sformatf("towers: %0d moves recorded", (int'(v) - 1024) / 4));
      for (int k = 0; k < moves.size(); k++) begin
        dmem_read(1024 + 4 * k, v);
        check(v == 32'(moves[k]), $sformatf("towers: move %0d = %0h expected %0h", k, v, moves[k]));
      end
    end

    // ---- quick sort ----
    reset_model();
    n = 20;
    load_program(prog_qsort(n));
    begin
      int av [];
      int len;
      av = new[n];
      for (int i = 0; i < n; i++) begin
        av[i] = int'($urandom_range(0, 200)) - 100;
        dmem_write(4 * i, 32'(av[i]));
      end
      len = 5 + qsort_ref(av, 0, n - 1) - 0;
      run_to_halt("qsort", len);
      for (int i = 0; i < n; i++) begin
        dmem_read(4 * i, v);
        check(v == 32'(av[i]), $sformatf("qsort: A[%0d]=%0d expected %0d", i, int'(v), av[i]));
        if (i > 0) check(av[i-1] <= av[i], "qsort reference is sorted");
      end
    end

    // ---- mechanisms ----
    check(slip_viol == 0, $sformatf("A-Port slip bound violated %0d times", slip_viol));
    $display("events: replay %0d mispredict %0d squash %0d heavy %0d light %0d full %0d quiesce %0d step %0d",
             n_replay, n_mispredict, n_squash, n_heavy, n_light, n_full, n_quiesce, n_step);
    check(n_replay > 0,     "scoreboard stall happened");
    check(n_mispredict > 0, "mispredict redirect happened");
    check(n_squash > 0,     "wrong-path squash happened");
    check(n_heavy > 0,      "a heavy port was seen");
    check(n_light > 0,      "a light port was seen");
    check(n_full > 0,       "a full port was seen");
    check(n_quiesce > 0,    "resynchronisation quiesced");
    check(n_step > 0,       "single step ran");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
