// tb_ip_dec: self-checking test of the decode model module.
// Each model cycle the testbench supplies one instruction and one write-back
// message. It checks, against values worked out here, that
//   * write-backs reach the register file before the same cycle's decode,
//   * operands and immediates are packed as EXE expects,
//   * an instruction using a busy register is turned into OP_REPLAY, and the
//     following instructions of the same epoch are dropped (NoMessage) until
//     one of the other epoch arrives,
//   * a release-only write-back clears the busy bit without a write.
//
// Decode with a scoreboard and a block-RAM register file follows the published
// design; the replay form of the stall, the epoch drop and the
// write-back-first ordering checked here are this design's own choices.
// One call of the cycle task is one model cycle of the module.
module tb_ip_dec;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [INST_W:0] i_sd, i_rd;
  logic [WB_W:0]   w_sd, w_rd;
  logic [DEC_W:0]  o_sd, o_rd;
  logic i_send, i_full, i_heavy, i_deq, i_empty, i_light;
  logic w_send, w_full, w_heavy, w_deq, w_empty, w_light;
  logic o_enq, o_full, o_light, o_empty, o_recv;
  logic idle, cycle_done, replay;
  logic [31:0] busy_regs;

  a_port #(.W(INST_W), .L(0), .K(2)) u_i (
    .clk, .rst_n, .send_en(i_send), .send_data(i_sd), .full(i_full), .heavy(i_heavy),
    .recv_en(i_deq), .recv_data(i_rd), .empty(i_empty), .light(i_light), .balanced(), .elems());
  a_port #(.W(WB_W), .L(0), .K(2)) u_w (
    .clk, .rst_n, .send_en(w_send), .send_data(w_sd), .full(w_full), .heavy(w_heavy),
    .recv_en(w_deq), .recv_data(w_rd), .empty(w_empty), .light(w_light), .balanced(), .elems());
  a_port #(.W(DEC_W), .L(0), .K(2)) u_o (
    .clk, .rst_n, .send_en(o_enq), .send_data(o_sd), .full(o_full), .heavy(),
    .recv_en(o_recv), .recv_data(o_rd), .empty(o_empty), .light(o_light), .balanced(), .elems());

  ip_dec dut (
    .clk, .rst_n, .mode(MODE_RUN), .step(1'b0),
    .inst_data(i_rd), .inst_empty(i_empty), .inst_heavy(i_heavy), .inst_deq(i_deq),
    .wb_data(w_rd), .wb_empty(w_empty), .wb_heavy(w_heavy), .wb_deq(w_deq),
    .dec_data(o_sd), .dec_full(o_full), .dec_light(o_light), .dec_enq(o_enq),
    .idle, .cycle_done, .replay, .busy_regs
  );

  // One model cycle: supply instruction + write-back, return DEC's output.
  int pcw = 0;
  task automatic cycle(logic iv, logic [31:0] ins, logic ep, logic wv, wb_msg_t wb,
                       output logic ov, output dec_msg_t om);
    inst_msg_t im;
    im = '{pc: 32'(pcw * 4), instr: ins, pred_npc: 32'(pcw * 4 + 4), bht_ctr: 2'b01, epoch: ep};
    pcw++;
    i_send = 1; i_sd = {iv, im}; w_send = 1; w_sd = {wv, wb};
    @(negedge clk);
    i_send = 0; w_send = 0;
    while (o_empty) @(negedge clk);
    ov = o_rd[DEC_W]; om = dec_msg_t'(o_rd[DEC_W-1:0]);
    o_recv = 1; @(negedge clk); o_recv = 0;
  endtask

  logic ov;
  dec_msg_t om;
  wb_msg_t nowb;
  initial begin
    rst_n = 0; i_send = 0; w_send = 0; o_recv = 0; i_sd = '0; w_sd = '0;
    nowb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // write r1 = 100, r2 = 7 through write-back messages; decode ADDU r3, r1, r2
    cycle(0, 0, 0, 1, '{rd: 1, value: 100, wr: 1}, ov, om);
    check(!ov, "no instruction -> NoMessage");
    cycle(1, rtype(FN_ADDU, 1, 2, 3), 0, 1, '{rd: 2, value: 7, wr: 1}, ov, om);
    check(ov && om.op == OP_ADD && om.a == 100 && om.b == 7 && om.rd == 3 && om.wr,
          $sformatf("ADDU operands a=%0d b=%0d (write-back seen in the same cycle)", om.a, om.b));
    check(busy_regs[3], "r3 marked busy");
    // dependent instruction: replay, then drop the same-epoch followers
    cycle(1, itype(OPC_ADDIU, 3, 4, -5), 0, 0, nowb, ov, om);
    check(ov && om.op == OP_REPLAY && om.pc == 32'h8, "dependent ADDIU becomes a replay of pc 8");
    cycle(1, itype(OPC_ORI, 0, 5, 16'hf0f0), 0, 0, nowb, ov, om);
    check(!ov, "same-epoch follower dropped while waiting for the refetch");
    // r3 released by write-back; refetched instruction arrives with the new epoch
    cycle(1, itype(OPC_ADDIU, 3, 4, -5), 1, 1, '{rd: 3, value: 50, wr: 1}, ov, om);
    check(ov && om.op == OP_ADD && om.a == 50 && om.b == 32'hfffffffb && om.rd == 4,
          "refetched ADDIU decodes with r3=50 and imm=-5");
    // release-only write-back for r4: busy cleared, register unchanged (0)
    cycle(1, itype(OPC_LUI, 0, 6, 16'h1234), 1, 1, '{rd: 4, value: 999, wr: 0}, ov, om);
    check(ov && om.op == OP_LUI && om.b == 32'h12340000 && om.rd == 6, "LUI immediate");
    check(!busy_regs[4], "release-only write-back clears r4");
    cycle(1, rtype(FN_OR, 4, 0, 7), 1, 1, '{rd: 6, value: 32'h12340000, wr: 1}, ov, om);
    check(ov && om.op == OP_OR && om.a == 0, "r4 was not written by the release");
    // store, branch and jump packing
    cycle(1, itype(OPC_SW, 1, 2, 12), 1, 0, nowb, ov, om);
    check(ov && om.op == OP_SW && om.a == 100 && om.b == 7 && om.imm == 12 && !om.wr,
          "SW: base, data and offset");
    cycle(1, itype(OPC_BNE, 1, 2, -3), 1, 0, nowb, ov, om);
    check(ov && om.op == OP_BNE && om.target == 32'(pcw * 4 - 4 + 4 - 12), "BNE target");
    cycle(1, jtype(OPC_JAL, 32'h40), 1, 0, nowb, ov, om);
    check(ov && om.op == OP_JAL && om.target == 32'h100 && om.rd == 31 && om.wr, "JAL target and link");
    cycle(1, rtype(FN_SLL, 0, 2, 8, 3), 1, 0, nowb, ov, om);
    check(ov && om.op == OP_SLL && om.b == 7 && om.imm == 3 && om.rd == 8, "SLL operand and shift");
    // hazard on the second source (rt = r8, still busy from the SLL)
    cycle(1, rtype(FN_ADDU, 0, 8, 9), 1, 0, nowb, ov, om);
    check(ov && om.op == OP_REPLAY, "rt hazard becomes a replay");
    check(!busy_regs[9], "replayed instruction does not reserve its destination");
    cycle(1, I_BREAK, 0, 1, '{rd: 8, value: 1, wr: 1}, ov, om);
    check(ov && om.op == OP_HALT && !om.wr, "BREAK decodes as halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
