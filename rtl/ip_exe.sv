// ip_exe: execute module of the 5-stage in-order pipeline model.
//
// Contains the ALU and resolves branches and jumps. Per model cycle it reads
// one message from the `decinst` A-Port (DEC) and writes one message to the
// `execres` A-Port (MEM) and one to the `resteer` A-Port (FET).
//
// Model behaviour per model cycle:
//   * An instruction whose epoch differs from this module's epoch was fetched
//     down a path that has since been abandoned. It is squashed: if it had a
//     destination, a `kill` message carries the register number on to WB so
//     that DEC's scoreboard entry is released.
//   * A live instruction is executed. Its actual next pc is compared with the
//     pc FET predicted; on a difference EXE sends a redirect on `resteer` and
//     flips its epoch. Branches also send the updated 2-bit counter, and
//     taken branches and jumps the target, so that FET updates its predictor
//     after resolution. An OP_REPLAY from DEC always redirects to its own pc.
//   * BREAK (OP_HALT) marks the program finished: it is passed on so WB can
//     report it, and every later instruction is squashed.
//
// FPGA schedule: start (dequeue, latch), ph 1 (`done`, messages written when
// both output ports have room). Two FPGA cycles per model cycle.
//
// The published design places the ALU here and updates the predictor after branch
// resolution in the ALU; the epoch/kill scheme, the counter update and the
// message formats are this design's own.
module ip_exe
  import aports_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  // decinst A-Port (consumer side)
  input  logic [DEC_W:0]   dec_data,
  input  logic             dec_empty,
  input  logic             dec_heavy,
  output logic             dec_deq,
  // execres A-Port (producer side)
  output logic [EXE_W:0]   exe_data,
  input  logic             exe_full,
  input  logic             exe_light,
  output logic             exe_enq,
  // resteer A-Port (producer side)
  output logic [RESTEER_W:0] rs_data,
  input  logic             rs_full,
  input  logic             rs_light,
  output logic             rs_enq,
  // status
  output logic             idle,
  output logic             cycle_done,
  output logic             mispredict,  // a redirect is being sent (write cycle)
  output logic             squash       // a wrong-path instruction is being dropped
);

  logic start, write, busy, done;
  aport_ctrl #(.N_IN(1), .N_OUT(2)) u_ctrl (
    .clk, .rst_n, .mode, .step,
    .in_empty(dec_empty), .in_heavy(dec_heavy),
    .out_full({rs_full, exe_full}), .out_light({rs_light, exe_light}),
    .done, .start, .write, .busy, .idle
  );
  assign dec_deq    = start;
  assign exe_enq    = write;
  assign rs_enq     = write;
  assign cycle_done = write;
  assign done       = busy;

  logic     dv_q, epoch_q, halted_q;
  dec_msg_t d_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dv_q <= 1'b0;
      d_q  <= '0;
    end else if (start) begin
      dv_q <= dec_data[DEC_W];
      d_q  <= dec_msg_t'(dec_data[DEC_W-1:0]);
    end
  end

  // Execution of the latched instruction
  logic         live;
  logic [31:0]  alu, pc4, actual_npc;
  logic         taken, is_branch, is_jump, redirect;
  exe_msg_t     em;
  logic         em_valid;
  resteer_msg_t rm;
  logic         rm_valid;

  assign live = dv_q && (d_q.epoch == epoch_q) && !halted_q;
  assign pc4  = d_q.pc + 32'd4;

  always_comb begin
    unique case (d_q.op)
      OP_ADD:  alu = d_q.a + d_q.b;
      OP_SUB:  alu = d_q.a - d_q.b;
      OP_AND:  alu = d_q.a & d_q.b;
      OP_OR:   alu = d_q.a | d_q.b;
      OP_XOR:  alu = d_q.a ^ d_q.b;
      OP_NOR:  alu = ~(d_q.a | d_q.b);
      OP_SLT:  alu = {31'h0, $signed(d_q.a) < $signed(d_q.b)};
      OP_SLTU: alu = {31'h0, d_q.a < d_q.b};
      OP_SLL:  alu = d_q.b << d_q.imm[4:0];
      OP_SRL:  alu = d_q.b >> d_q.imm[4:0];
      OP_SRA:  alu = $unsigned($signed(d_q.b) >>> d_q.imm[4:0]);
      OP_LUI:  alu = d_q.b;
      OP_JAL:  alu = pc4;
      default: alu = d_q.a + d_q.imm;  // load / store address
    endcase
  end

  always_comb begin
    is_branch  = (d_q.op == OP_BEQ) || (d_q.op == OP_BNE);
    is_jump    = (d_q.op == OP_J) || (d_q.op == OP_JAL) || (d_q.op == OP_JR);
    taken      = (d_q.op == OP_BEQ) ? (d_q.a == d_q.b) :
                 (d_q.op == OP_BNE) ? (d_q.a != d_q.b) : 1'b0;
    unique case (d_q.op)
      OP_BEQ, OP_BNE: actual_npc = taken ? d_q.target : pc4;
      OP_J, OP_JAL:   actual_npc = d_q.target;
      OP_JR:          actual_npc = d_q.a;
      OP_REPLAY:      actual_npc = d_q.pc;
      default:        actual_npc = pc4;
    endcase
    redirect = (d_q.op == OP_REPLAY) || (actual_npc != d_q.pred_npc);

    rm = '{redirect: redirect, npc: actual_npc,
           upd_bht: is_branch,
           upd_btb: is_jump || (is_branch && taken),
           br_pc: d_q.pc,
           new_ctr: taken ? ((d_q.bht_ctr == 2'b11) ? 2'b11 : d_q.bht_ctr + 2'b01)
                          : ((d_q.bht_ctr == 2'b00) ? 2'b00 : d_q.bht_ctr - 2'b01),
           target: actual_npc, is_jump: is_jump};
    rm_valid = live && (redirect || is_branch || is_jump);

    em = '{mem_op: MEM_NONE, addr: alu, value: alu, rd: d_q.rd, wr: d_q.wr,
           kill: 1'b0, halt: 1'b0};
    em_valid = 1'b0;
    if (dv_q && !live) begin
      // squashed: release the scoreboard entry only
      em.wr    = 1'b0;
      em.kill  = 1'b1;
      em_valid = d_q.wr;
    end else if (live && d_q.op != OP_REPLAY) begin
      em_valid = 1'b1;
      unique case (d_q.op)
        OP_LW:   em.mem_op = MEM_LOAD;
        OP_SW:   begin em.mem_op = MEM_STORE; em.value = d_q.b; em.wr = 1'b0; end
        OP_HALT: em.halt = 1'b1;
        default: ;
      endcase
    end
  end

  assign exe_data   = {em_valid, em};
  assign rs_data    = {rm_valid, rm};
  assign mispredict = write && rm_valid && redirect;
  assign squash     = write && dv_q && !live;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      epoch_q  <= 1'b0;
      halted_q <= 1'b0;
    end else if (write && live) begin
      if (redirect) epoch_q <= ~epoch_q;
      if (d_q.op == OP_HALT) halted_q <= 1'b1;
    end
  end

endmodule
