// tb_regfile_perf_model: self-checking test of the 2R/2W register-file model.
//
// Inputs are held for each model cycle and changed right after `cc_done`, as
// a unit-delay harness would. For each model cycle the two read values are
// compared with a reference register file that, like the target, returns the
// contents from before the cycle's writes. The test also checks that a model
// cycle takes exactly 4 FPGA cycles and that `cur_cc` counts model cycles.
//
// The 2-read/2-write register file on a 1-read/1-write RAM in 4 FPGA cycles
// per model cycle follows the published example; the read-before-write
// ordering, the register count and width are this design's own choices.
module tb_regfile_perf_model;
  localparam int unsigned N = 32, W = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0]   ra1, ra2, wa1, wa2;
  logic         we1, we2, cc_done;
  logic [W-1:0] wv1, wv2, rv1, rv2, refrf [N], e1, e2;
  logic [31:0]  cur_cc;

  regfile_perf_model #(.NREGS(N), .WIDTH(W), .CCW(32)) dut (
    .clk, .rst_n, .rd_addr1(ra1), .rd_addr2(ra2), .wr_en1(we1), .wr_addr1(wa1), .wr_val1(wv1),
    .wr_en2(we2), .wr_addr2(wa2), .wr_val2(wv2), .rd_val1(rv1), .rd_val2(rv2),
    .cur_cc, .cc_done
  );

  int fpga, last_done;
  always @(posedge clk) fpga <= rst_n ? fpga + 1 : 0;

  task automatic pick();
    ra1 = 5'($urandom); ra2 = 5'($urandom);
    wa1 = ($urandom_range(0, 3) == 0) ? ra1 : 5'($urandom);
    do wa2 = 5'($urandom); while (wa2 == wa1);  // target rule: no double write
    we1 = $urandom_range(0, 3) != 0; we2 = $urandom_range(0, 3) != 0;
    wv1 = W'($urandom); wv2 = W'($urandom);
  endtask

  initial begin
    rst_n = 0;
    pick();
    we1 = 1; we2 = 1;
    for (int i = 0; i < N; i++) refrf[i] = '0;
    // clear the RAM through the model: 16 model cycles of two writes
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i += 2) begin
      wa1 = 5'(i); wa2 = 5'(i + 1); wv1 = '0; wv2 = '0; we1 = 1; we2 = 1;
      do @(negedge clk); while (!cc_done);
      last_done = fpga;
      @(negedge clk);
    end
    check(cur_cc == 32'(N / 2), $sformatf("cur_cc %0d after %0d model cycles", cur_cc, N / 2));
    for (int t = 0; t < 500; t++) begin
      // the model samples inputs in phase 0, which is now
      pick();
      e1 = refrf[ra1]; e2 = refrf[ra2];
      if (we1) refrf[wa1] = wv1;
      if (we2) refrf[wa2] = wv2;
      do @(negedge clk); while (!cc_done);
      check(fpga - last_done == 4, $sformatf("model cycle took %0d FPGA cycles", fpga - last_done));
      last_done = fpga;
      @(negedge clk);
      check(rv1 == e1 && rv2 == e2,
            $sformatf("reads r%0d=%h r%0d=%h expected %h %h", ra1, rv1, ra2, rv2, e1, e2));
    end
    check(cur_cc == 32'(N / 2 + 500), "cur_cc counts every model cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
