// tb_ip_wb: self-checking test of the write-back model module.
// Five result messages are queued on its input A-Port while the module is
// held (step mode, no step). Released, it must turn them into wbinfo
// messages (register write, scoreboard release for a squashed instruction,
// NoMessage otherwise) at one model cycle per FPGA cycle, count three
// retired instructions and report the halt.
//
// Write-back sending register updates back to decode follows the published
// design; release-only messages for killed instructions, the retired count and
// the halt flag checked here are this design's own choices. The stage takes
// one FPGA cycle per model cycle, which is checked.
module tb_ip_wb;
  import aports_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  sim_mode_t mode;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [RES_W:0] in_sd, in_rd;
  logic [WB_W:0]  out_sd, out_rd;
  logic in_send, in_full, in_heavy, in_deq, in_empty, in_light;
  logic out_enq, out_full, out_heavy, out_recv, out_empty, out_light;
  logic idle, cycle_done, halted;
  logic [31:0] instret;

  a_port #(.W(RES_W), .L(0), .K(8)) u_in (
    .clk, .rst_n, .send_en(in_send), .send_data(in_sd), .full(in_full), .heavy(in_heavy),
    .recv_en(in_deq), .recv_data(in_rd), .empty(in_empty), .light(in_light), .balanced(), .elems());
  a_port #(.W(WB_W), .L(0), .K(8)) u_out (
    .clk, .rst_n, .send_en(out_enq), .send_data(out_sd), .full(out_full), .heavy(out_heavy),
    .recv_en(out_recv), .recv_data(out_rd), .empty(out_empty), .light(out_light), .balanced(), .elems());

  ip_wb dut (
    .clk, .rst_n, .mode, .step(1'b0),
    .res_data(in_rd), .res_empty(in_empty), .res_heavy(in_heavy), .res_deq(in_deq),
    .wb_data(out_sd), .wb_full(out_full), .wb_light(out_light), .wb_enq(out_enq),
    .idle, .cycle_done, .halted, .instret
  );

  task automatic push(logic v, res_msg_t m);
    in_send = 1; in_sd = {v, m};
    @(negedge clk);
    in_send = 0;
  endtask

  int n_done;
  always @(posedge clk) if (rst_n && cycle_done) n_done <= n_done + 1;

  wb_msg_t w;
  int t0;
  initial begin
    rst_n = 0; mode = MODE_STEP; in_send = 0; in_sd = '0; out_recv = 0; n_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    push(1, '{value: 32'h55, rd: 5'd5, wr: 1, kill: 0, halt: 0});
    push(0, '0);
    push(1, '{value: 32'h0, rd: 5'd7, wr: 0, kill: 1, halt: 0});
    push(1, '{value: 32'h99, rd: 5'd0, wr: 0, kill: 0, halt: 0});
    push(1, '{value: 32'h0, rd: 5'd0, wr: 0, kill: 0, halt: 1});
    check(n_done == 0 && idle, "held in step mode without a step");
    mode = MODE_RUN;
    t0 = 0;
    while (n_done < 5 && t0 < 50) begin @(negedge clk); t0++; end
    check(t0 == 5, $sformatf("five model cycles in five FPGA cycles (took %0d)", t0));
    check(instret == 3, $sformatf("instret %0d expected 3", instret));
    check(halted, "halt reported");
    // drain outputs
    for (int i = 0; i < 5; i++) begin
      w = wb_msg_t'(out_rd[WB_W-1:0]);
      unique case (i)
        0: check(out_rd[WB_W] && w.rd == 5 && w.value == 32'h55 && w.wr, "register write message");
        1: check(!out_rd[WB_W], "NoMessage for NoMessage");
        2: check(out_rd[WB_W] && w.rd == 7 && !w.wr, "squash releases r7 without writing");
        3: check(!out_rd[WB_W], "NoMessage for an instruction without a destination");
        4: check(!out_rd[WB_W], "NoMessage for the halt");
      endcase
      out_recv = 1; @(negedge clk); out_recv = 0;
    end
    check(out_empty, "exactly five output messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
