// tb_aport_ctrl: self-checking test of the per-module A-Ports controller.
//
// Part 1 rebuilds the two-module example of the A-Ports timing diagram:
// module A feeds module B through one A-Port (latency 0, 2 slots). Both
// simulate four model cycles a, b, c, d taking 3, 1, 3, 1 FPGA cycles. With
// decoupled simulation A writes its results in FPGA cycles 2, 3, 6, 7 and B
// begins its cycles in FPGA cycles 3, 6, 7, 10, so the four model cycles
// finish after 11 FPGA cycles (a barrier-synchronised version needs 13).
//
// Part 2 drives one controller directly and checks the begin conditions of
// the three modes: free run (all inputs non-empty), resynchronise (also
// behind a neighbour: a heavy input or light output) and single step (one
// model cycle per step pulse), and that writing waits for full outputs.
//
// The 3,1,3,1 example and its 11-cycle result (13 with a barrier) are the
// published example. Its schedule has B wait for A's first message, which a
// latency-0 port gives; the 2 slots of that port are this testbench's
// choice. Cycle numbers count rising edges
// after reset.
module tb_aport_ctrl;
  import aports_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // ---------------- Part 1: modules A and B ----------------
  int dur [4] = '{3, 1, 3, 1};
  logic      a_start, a_write, a_busy, a_idle, a_done;
  logic      b_start, b_write, b_busy, b_idle, b_done;
  logic      p_full, p_heavy, p_empty, p_light, p_bal;
  logic [0:0][2:0] p_sd, p_rd;
  int        a_k, b_k, a_t, b_t;   // model cycle index and FPGA cycles spent in it
  logic [1:0] b_msg;

  aport_ctrl #(.N_IN(1), .N_OUT(1)) u_a (
    .clk, .rst_n, .mode(MODE_RUN), .step(1'b0),
    .in_empty(1'b0), .in_heavy(1'b0), .out_full(p_full), .out_light(p_light),
    .done(a_done), .start(a_start), .write(a_write), .busy(a_busy), .idle(a_idle)
  );
  a_port #(.W(2), .L(0), .K(2), .B(1)) u_p (
    .clk, .rst_n, .send_en(a_write), .send_data(p_sd), .full(p_full), .heavy(p_heavy),
    .recv_en(b_start), .recv_data(p_rd), .empty(p_empty), .light(p_light),
    .balanced(p_bal), .elems()
  );
  aport_ctrl #(.N_IN(1), .N_OUT(1)) u_b (
    .clk, .rst_n, .mode(MODE_RUN), .step(1'b0),
    .in_empty(p_empty), .in_heavy(p_heavy), .out_full(1'b0), .out_light(1'b0),
    .done(b_done), .start(b_start), .write(b_write), .busy(b_busy), .idle(b_idle)
  );

  // A: spends dur[k] FPGA cycles on model cycle k (counting the start cycle);
  // stops after four model cycles. B does the same with the message it read.
  assign a_done = (a_k < 4) && ((a_start ? 1 : a_t + 1) >= dur[a_k % 4]);
  assign p_sd   = {1'b1, 2'(a_k)};
  assign b_done = (b_start ? 1 : b_t + 1) >= dur[b_start ? int'(p_rd[0][1:0]) : int'(b_msg)];

  int a_wr_at [$], b_st_at [$], b_last_wr;
  always @(posedge clk) begin
    if (!rst_n) begin
      a_k <= 0; a_t <= 0; b_t <= 0; b_msg <= '0; b_last_wr <= -1;
    end else begin
      if (a_write) begin a_k <= a_k + 1; a_t <= 0; a_wr_at.push_back(cyc); end
      else if (a_start || a_busy) a_t <= (a_start ? 1 : a_t + 1);
      if (b_start) begin b_msg <= p_rd[0][1:0]; b_st_at.push_back(cyc); end
      if (b_write) begin b_t <= 0; b_last_wr <= cyc; end
      else if (b_start || b_busy) b_t <= (b_start ? 1 : b_t + 1);
    end
  end

  // ---------------- Part 2: one controller, driven directly ----------------
  sim_mode_t m;
  logic      s_step, s_done, s_start, s_write, s_busy, s_idle;
  logic [1:0] s_in_empty, s_in_heavy;
  logic       s_out_full, s_out_light;
  aport_ctrl #(.N_IN(2), .N_OUT(1)) u_s (
    .clk, .rst_n, .mode(m), .step(s_step),
    .in_empty(s_in_empty), .in_heavy(s_in_heavy), .out_full(s_out_full), .out_light(s_out_light),
    .done(s_done), .start(s_start), .write(s_write), .busy(s_busy), .idle(s_idle)
  );

  int n;
  initial begin
    rst_n = 1'b0;
    m = MODE_RUN; s_step = 0; s_done = 0;
    s_in_empty = 2'b11; s_in_heavy = 2'b00; s_out_full = 0; s_out_light = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (16) @(negedge clk);

    // Part 1 results
    check(a_wr_at.size() == 4 && a_wr_at[0] == 2 && a_wr_at[1] == 3 && a_wr_at[2] == 6 && a_wr_at[3] == 7,
          $sformatf("A writes in FPGA cycles 2,3,6,7 (got %p)", a_wr_at));
    check(b_st_at.size() == 4 && b_st_at[0] == 3 && b_st_at[1] == 6 && b_st_at[2] == 7 && b_st_at[3] == 10,
          $sformatf("B begins in FPGA cycles 3,6,7,10 (got %p)", b_st_at));
    check(b_last_wr == 10, $sformatf("4 model cycles take 11 FPGA cycles (last write at %0d)", b_last_wr));
    check(p_empty && p_bal, "port balanced (empty, latency 0) at the end");

    // Part 2: free run needs every input non-empty
    m = MODE_RUN; s_in_empty = 2'b01; #1;
    check(!s_start, "run: no start with an empty input");
    s_in_empty = 2'b00; #1;
    check(s_start, "run: start when all inputs non-empty");
    s_done = 1; s_out_full = 1; #1;
    check(!s_write, "no write while an output is full");
    @(negedge clk);
    check(s_busy, "busy after start");
    s_out_full = 0; #1;
    check(s_write, "write once the output has room");
    @(negedge clk);
    check(s_idle, "idle after write");
    s_done = 0;

    // resynchronise: only when behind
    m = MODE_RESYNC; s_in_heavy = 2'b00; s_out_light = 0; #1;
    check(!s_start, "resync: balanced module does not advance");
    s_in_heavy = 2'b10; #1;
    check(s_start, "resync: heavy input lets it advance");
    s_in_heavy = 2'b00; s_out_light = 1; #1;
    check(s_start, "resync: light output lets it advance");
    s_in_empty = 2'b10; #1;
    check(!s_start, "resync: still needs non-empty inputs");
    s_in_empty = 2'b00; s_out_light = 0;

    // single step: exactly one model cycle per pulse
    m = MODE_STEP; s_done = 1;
    @(negedge clk);
    check(!s_start, "step: nothing without a step pulse");
    s_step = 1; @(negedge clk); s_step = 0;
    n = 0;
    repeat (6) begin #1; n += int'(s_start); @(negedge clk); end
    check(n == 1, $sformatf("step: one model cycle per pulse (got %0d)", n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
