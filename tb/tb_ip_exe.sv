// tb_ip_exe: self-checking test of the execute model module.
// Random ALU instructions are compared with results computed here; then a
// directed sequence covers a mispredicted taken branch (redirect, predictor
// update, epoch flip), squashing of an instruction from the old epoch,
// a scoreboard replay, loads and stores, a correctly predicted JR and the
// halt. Both output A-Ports are drained in step and compared in order, and
// each model cycle must take two FPGA cycles.
//
// Branch resolution in execute and the predictor update it sends back follow
// the published design; the message formats, the epoch/kill handling and the
// replay redirect checked here are this design's own choices. Each message
// sent is one model cycle of the module.
module tb_ip_exe;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DEC_W:0]     in_sd, in_rd;
  logic [EXE_W:0]     e_sd, e_rd;
  logic [RESTEER_W:0] r_sd, r_rd;
  logic in_send, in_full, in_heavy, in_deq, in_empty, in_light;
  logic e_enq, e_full, e_light, e_empty, r_enq, r_full, r_light, r_empty, drain;
  logic idle, cycle_done, mispredict, squash;

  a_port #(.W(DEC_W), .L(0), .K(4)) u_in (
    .clk, .rst_n, .send_en(in_send), .send_data(in_sd), .full(in_full), .heavy(in_heavy),
    .recv_en(in_deq), .recv_data(in_rd), .empty(in_empty), .light(in_light), .balanced(), .elems());
  a_port #(.W(EXE_W), .L(0), .K(4)) u_e (
    .clk, .rst_n, .send_en(e_enq), .send_data(e_sd), .full(e_full), .heavy(),
    .recv_en(drain), .recv_data(e_rd), .empty(e_empty), .light(e_light), .balanced(), .elems());
  a_port #(.W(RESTEER_W), .L(0), .K(4)) u_r (
    .clk, .rst_n, .send_en(r_enq), .send_data(r_sd), .full(r_full), .heavy(),
    .recv_en(drain), .recv_data(r_rd), .empty(r_empty), .light(r_light), .balanced(), .elems());

  ip_exe dut (
    .clk, .rst_n, .mode(MODE_RUN), .step(1'b0),
    .dec_data(in_rd), .dec_empty(in_empty), .dec_heavy(in_heavy), .dec_deq(in_deq),
    .exe_data(e_sd), .exe_full(e_full), .exe_light(e_light), .exe_enq(e_enq),
    .rs_data(r_sd), .rs_full(r_full), .rs_light(r_light), .rs_enq(r_enq),
    .idle, .cycle_done, .mispredict, .squash
  );

  logic [EXE_W:0]     exp_e [$];
  logic [RESTEER_W:0] exp_r [$];
  int n_out = 0, n_mis = 0, n_sq = 0, n_done = 0, first_done = -1, last_done = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cycle_done) begin
      n_done <= n_done + 1;
      if (first_done < 0) first_done <= cyc;
      last_done <= cyc;
    end
  end
  always @(negedge clk) begin
    n_mis += int'(mispredict);
    n_sq  += int'(squash);
    drain = 0;
    if (rst_n && !e_empty) begin
      logic [EXE_W:0] ee; logic [RESTEER_W:0] er;
      ee = exp_e.pop_front(); er = exp_r.pop_front();
      check(e_rd[EXE_W] == ee[EXE_W] && (!ee[EXE_W] || e_rd == ee), $sformatf("execres %0d: got %h expected %h", n_out, e_rd, ee));
      check(r_rd[RESTEER_W] == er[RESTEER_W] && (!er[RESTEER_W] || r_rd == er), $sformatf("resteer %0d: got %h expected %h", n_out, r_rd, er));
      n_out++;
      drain = 1;
    end
  end

  task automatic send(dec_msg_t d, logic [EXE_W:0] ee, logic [RESTEER_W:0] er);
    exp_e.push_back(ee);
    exp_r.push_back(er);
    while (in_full) @(negedge clk);
    in_send = 1; in_sd = {1'b1, d};
    @(negedge clk);
    in_send = 0;
  endtask

  function automatic logic [31:0] ref_alu(op_t op, logic [31:0] a, logic [31:0] b, logic [4:0] sh);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_NOR:  return ~(a | b);
      OP_SLT:  return (int'(a) < int'(b)) ? 1 : 0;
      OP_SLTU: return (a < b) ? 1 : 0;
      OP_SLL:  return b << sh;
      OP_SRL:  return b >> sh;
      OP_SRA:  return 32'(int'(b) >>> sh);
      default: return b;  // OP_LUI
    endcase
  endfunction

  op_t ops [12] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
                    OP_SLL, OP_SRL, OP_SRA, OP_LUI};
  dec_msg_t d;
  exe_msg_t e;
  resteer_msg_t r;
  initial begin
    rst_n = 0; in_send = 0; in_sd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random ALU work, correctly predicted
    for (int i = 0; i < 200; i++) begin
      d = '0;
      d.op = ops[$urandom_range(0, 11)];
      d.pc = {$urandom, 2'b00}; d.pred_npc = d.pc + 4;
      d.a = $urandom; d.b = ($urandom_range(0, 3) == 0) ? d.a : $urandom;
      d.imm = {27'h0, 5'($urandom)};
      d.rd = 5'($urandom_range(1, 31)); d.wr = 1;
      e = '{mem_op: MEM_NONE, addr: ref_alu(d.op, d.a, d.b, d.imm[4:0]),
            value: ref_alu(d.op, d.a, d.b, d.imm[4:0]), rd: d.rd, wr: 1, kill: 0, halt: 0};
      send(d, {1'b1, e}, '0);
    end
    // mispredicted taken BEQ at pc 0x100, target 0x200, predicted not taken
    d = '0; d.op = OP_BEQ; d.pc = 32'h100; d.pred_npc = 32'h104; d.target = 32'h200;
    d.a = 7; d.b = 7; d.bht_ctr = 2'b01;
    e = '{mem_op: MEM_NONE, addr: 32'h0 + 7, value: 32'h7, rd: 0, wr: 0, kill: 0, halt: 0};
    r = '{redirect: 1, npc: 32'h200, upd_bht: 1, upd_btb: 1, br_pc: 32'h100,
          new_ctr: 2'b10, target: 32'h200, is_jump: 0};
    send(d, {1'b1, e}, {1'b1, r});
    // old-epoch instruction with a destination: squashed, releases r3
    d = '0; d.op = OP_ADD; d.pc = 32'h104; d.pred_npc = 32'h108; d.rd = 3; d.wr = 1; d.epoch = 0;
    e = '{mem_op: MEM_NONE, addr: 0, value: 0, rd: 3, wr: 0, kill: 1, halt: 0};
    send(d, {1'b1, e}, '0);
    // new-epoch instruction executes
    d = '0; d.op = OP_ADD; d.pc = 32'h200; d.pred_npc = 32'h204; d.a = 5; d.b = 6; d.rd = 4;
    d.wr = 1; d.epoch = 1;
    e = '{mem_op: MEM_NONE, addr: 11, value: 11, rd: 4, wr: 1, kill: 0, halt: 0};
    send(d, {1'b1, e}, '0);
    // replay of pc 0x204 whose predicted next pc happens to equal its pc:
    // it must redirect because it is a replay, not because of a mismatch
    d = '0; d.op = OP_REPLAY; d.pc = 32'h204; d.pred_npc = 32'h204; d.epoch = 1;
    r = '{redirect: 1, npc: 32'h204, upd_bht: 0, upd_btb: 0, br_pc: 32'h204,
          new_ctr: 2'b00, target: 32'h204, is_jump: 0};
    send(d, '0, {1'b1, r});
    // load and store in epoch 0
    d = '0; d.op = OP_LW; d.pc = 32'h204; d.pred_npc = 32'h208; d.a = 32'h40; d.imm = 32'h8;
    d.rd = 9; d.wr = 1;
    e = '{mem_op: MEM_LOAD, addr: 32'h48, value: 32'h48, rd: 9, wr: 1, kill: 0, halt: 0};
    send(d, {1'b1, e}, '0);
    d = '0; d.op = OP_SW; d.pc = 32'h208; d.pred_npc = 32'h20c; d.a = 32'h40; d.b = 32'hdead;
    d.imm = 32'hfffffffc;
    e = '{mem_op: MEM_STORE, addr: 32'h3c, value: 32'hdead, rd: 0, wr: 0, kill: 0, halt: 0};
    send(d, {1'b1, e}, '0);
    // correctly predicted JR to 0x300: target update, no redirect
    d = '0; d.op = OP_JR; d.pc = 32'h20c; d.pred_npc = 32'h300; d.a = 32'h300;
    e = '{mem_op: MEM_NONE, addr: 32'h300, value: 32'h300, rd: 0, wr: 0, kill: 0, halt: 0};
    r = '{redirect: 0, npc: 32'h300, upd_bht: 0, upd_btb: 1, br_pc: 32'h20c,
          new_ctr: 2'b00, target: 32'h300, is_jump: 1};
    send(d, {1'b1, e}, {1'b1, r});
    // halt, then everything is squashed
    d = '0; d.op = OP_HALT; d.pc = 32'h300; d.pred_npc = 32'h304;
    e = '{mem_op: MEM_NONE, addr: 0, value: 0, rd: 0, wr: 0, kill: 0, halt: 1};
    send(d, {1'b1, e}, '0);
    d = '0; d.op = OP_ADD; d.pc = 32'h304; d.pred_npc = 32'h308; d.rd = 2; d.wr = 1;
    e = '{mem_op: MEM_NONE, addr: 0, value: 0, rd: 2, wr: 0, kill: 1, halt: 0};
    send(d, {1'b1, e}, '0);

    while (n_out < 209) @(negedge clk);
    check(n_mis == 2, $sformatf("two redirects (got %0d)", n_mis));
    check(n_sq == 2, $sformatf("two squashes (got %0d)", n_sq));
    check(last_done - first_done + 1 <= 2 * 209 + 8,
          $sformatf("about two FPGA cycles per model cycle (%0d for 209)", last_done - first_done + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
