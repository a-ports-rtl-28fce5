// tb_bram_1r1w: self-checking test of the 1-read/1-write block RAM.
// Random reads and writes are compared with a reference array; the check
// covers the one-cycle read latency, holding of the read data between reads,
// and old-data return when a read and a write hit the same address.
//
// Block RAMs as the building block of every large model structure follow the
// published design; one-cycle read latency and read-first collision behaviour
// are this design's choices and are what is checked here.
module tb_bram_1r1w;
  localparam int unsigned DEPTH = 64, WIDTH = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic             re, we;
  logic [5:0]       ra, wa;
  logic [WIDTH-1:0] rd, wd, ref_mem [DEPTH], expect_q;
  logic             pend;

  bram_1r1w #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk, .rd_en(re), .rd_addr(ra), .rd_data(rd), .wr_en(we), .wr_addr(wa), .wr_data(wd)
  );

  initial begin
    re = 0; we = 0; ra = '0; wa = '0; wd = '0; pend = 0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      re = $urandom_range(0, 1) == 1;
      we = $urandom_range(0, 1) == 1;
      ra = 6'($urandom);
      wa = ($urandom_range(0, 3) == 0) ? ra : 6'($urandom);
      wd = WIDTH'($urandom);
      @(posedge clk);
      if (re) expect_q = ref_mem[ra];    // value before this cycle's write
      if (we) ref_mem[wa] = wd;
      if (re) pend = 1;
      @(negedge clk);
      if (pend) check(rd == expect_q, $sformatf("read data %h expected %h", rd, expect_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
