// tb_ip_fet: self-checking test of the fetch model module.
// The instruction memory is loaded with distinct words. Per model cycle the
// testbench supplies one resteer message and reads one inst message. It
// checks sequential fetch, a redirect (new pc, flipped epoch), the branch
// predictor and target buffer updates taking effect on the next fetch of the
// same pc (taken prediction for a branch with a taken counter, and for a
// jump regardless of the counter), and three FPGA cycles per model cycle.
//
// Fetch with a BHT and BTB kept in block RAM, updated from execute, follows
// the published design; the predictor sizes, the 2-bit counters, the epoch bit
// and the 3-FPGA-cycle schedule checked here are this design's own choices.
module tb_ip_fet;
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

  logic [RESTEER_W:0] r_sd, r_rd;
  logic [INST_W:0]    o_sd, o_rd;
  logic r_send, r_full, r_heavy, r_deq, r_empty, r_light;
  logic o_enq, o_full, o_light, o_empty, o_recv;
  logic imem_we, idle, cycle_done, redirected;
  logic [7:0]  imem_waddr;
  logic [31:0] imem_wdata;

  a_port #(.W(RESTEER_W), .L(0), .K(2)) u_r (
    .clk, .rst_n, .send_en(r_send), .send_data(r_sd), .full(r_full), .heavy(r_heavy),
    .recv_en(r_deq), .recv_data(r_rd), .empty(r_empty), .light(r_light), .balanced(), .elems());
  a_port #(.W(INST_W), .L(0), .K(2)) u_o (
    .clk, .rst_n, .send_en(o_enq), .send_data(o_sd), .full(o_full), .heavy(),
    .recv_en(o_recv), .recv_data(o_rd), .empty(o_empty), .light(o_light), .balanced(), .elems());

  ip_fet #(.IMEM_WORDS(256), .BHT_ENTRIES(64), .BTB_ENTRIES(16)) dut (
    .clk, .rst_n, .mode(MODE_RUN), .step(1'b0),
    .rs_data(r_rd), .rs_empty(r_empty), .rs_heavy(r_heavy), .rs_deq(r_deq),
    .inst_data(o_sd), .inst_full(o_full), .inst_light(o_light), .inst_enq(o_enq),
    .imem_we, .imem_waddr, .imem_wdata, .idle, .cycle_done, .redirected
  );

  int cyc = 0, last_done = 0, dt;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cycle_done) begin dt <= cyc - last_done; last_done <= cyc; end
  end

  task automatic cycle(logic rv, resteer_msg_t rm, output inst_msg_t im);
    r_send = 1; r_sd = {rv, rm};
    @(negedge clk);
    r_send = 0;
    while (o_empty) @(negedge clk);
    check(o_rd[INST_W], "fetch always sends a message");
    im = inst_msg_t'(o_rd[INST_W-1:0]);
    o_recv = 1; @(negedge clk); o_recv = 0;
  endtask

  function automatic logic [31:0] word_at(logic [31:0] pc);
    return 32'hC0DE_0000 | (pc >> 2);
  endfunction

  inst_msg_t im;
  resteer_msg_t none, rm;
  initial begin
    rst_n = 0; r_send = 0; r_sd = '0; o_recv = 0; imem_we = 0; none = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(i); imem_wdata = word_at(32'(i * 4));
    end
    @(negedge clk); imem_we = 0;
    rst_n = 1;
    cycle(0, none, im);
    check(im.pc == 0 && im.instr == word_at(0) && im.pred_npc == 4 && !im.epoch, "first fetch at pc 0");
    cycle(0, none, im);
    check(im.pc == 4 && im.instr == word_at(4) && im.pred_npc == 8, "sequential fetch at pc 4");
    // taken branch at 0x8 resolved: redirect to 0x40, train predictor and target buffer
    rm = '{redirect: 1, npc: 32'h40, upd_bht: 1, upd_btb: 1, br_pc: 32'h8, new_ctr: 2'b10,
           target: 32'h40, is_jump: 0};
    cycle(1, rm, im);
    check(im.pc == 32'h40 && im.instr == word_at(32'h40) && im.epoch, "redirect to 0x40 with new epoch");
    // a later redirect back to 0x8: now predicted taken to 0x40
    rm = '{redirect: 1, npc: 32'h8, upd_bht: 0, upd_btb: 0, br_pc: 32'h0, new_ctr: 2'b00,
           target: 32'h0, is_jump: 0};
    cycle(1, rm, im);
    check(im.pc == 32'h8 && im.pred_npc == 32'h40 && im.bht_ctr == 2'b10 && !im.epoch,
          "trained branch predicted taken");
    cycle(0, none, im);
    check(im.pc == 32'h40, "fetch follows the prediction");
    // jump at 0x44 to 0x80 learned without a redirect; the update is written
    // while 0x44 is being fetched, so it takes effect from the next fetch
    rm = '{redirect: 0, npc: 32'h80, upd_bht: 0, upd_btb: 1, br_pc: 32'h44, new_ctr: 2'b00,
           target: 32'h80, is_jump: 1};
    cycle(1, rm, im);
    check(im.pc == 32'h44 && im.pred_npc == 32'h48, "update not yet visible in the same fetch");
    rm = '{redirect: 1, npc: 32'h44, upd_bht: 0, upd_btb: 0, br_pc: 32'h0, new_ctr: 2'b00,
           target: 32'h0, is_jump: 0};
    cycle(1, rm, im);
    check(im.pc == 32'h44 && im.pred_npc == 32'h80, "jump predicted from the target buffer");
    cycle(0, none, im);
    check(im.pc == 32'h80 && im.instr == word_at(32'h80), "fetch at the jump target");
    // weaken the branch at 0x8, then fetch it again: not taken
    rm = '{redirect: 1, npc: 32'h100, upd_bht: 1, upd_btb: 0, br_pc: 32'h8, new_ctr: 2'b01,
           target: 32'h0, is_jump: 0};
    cycle(1, rm, im);
    check(im.pc == 32'h100, "redirect to 0x100");
    rm = '{redirect: 1, npc: 32'h8, upd_bht: 0, upd_btb: 0, br_pc: 32'h0, new_ctr: 2'b00,
           target: 32'h0, is_jump: 0};
    cycle(1, rm, im);
    check(im.pc == 32'h8 && im.pred_npc == 32'hc && im.bht_ctr == 2'b01, "weak counter predicts not taken");
    // throughput: two queued resteer messages, output drained at once
    r_send = 1; r_sd = '0; @(negedge clk); @(negedge clk); r_send = 0;
    repeat (10) begin o_recv = !o_empty; @(negedge clk); end
    o_recv = 0;
    check(dt == 3, $sformatf("three FPGA cycles per model cycle (got %0d)", dt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
