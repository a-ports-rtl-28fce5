// ip_dec: decode module of the 5-stage in-order pipeline model.
//
// Holds the architectural register file (a block RAM with one read and one
// write port) and the scoreboard (one busy bit per register). Per model cycle
// it reads one message from the `inst` A-Port (FET) and one from the `wbinfo`
// A-Port (WB), and writes one message to the `decinst` A-Port (EXE).
//
// Model behaviour per model cycle:
//   * A write-back message is applied first: the register is written (unless
//     the message only releases a squashed instruction) and its busy bit is
//     cleared, so the instruction decoded in the same model cycle sees it.
//   * An instruction whose source or destination register is busy may not
//     proceed (back-to-back dependent operations are stalled). Since nothing
//     flows from DEC back to FET, the stall is modelled as a replay: DEC sends
//     an OP_REPLAY message carrying the instruction's pc, EXE turns it into a
//     redirect to that pc, and DEC drops the instructions FET delivers with the
//     old epoch until the refetched one arrives.
//   * Otherwise the instruction is decoded, its operands are read, the busy bit
//     of its destination is set and the decoded message is sent.
//
// FPGA schedule: start (dequeue both ports, apply the write-back), ph 1
// (decode, scoreboard check, read rs), ph 2 (read rt), ph 3 (operands
// complete), ph 4 (`done`). Empty, dropped and replayed instructions finish
// after ph 1. The two operand reads share the RAM's single read port, the way
// the register-file model of the published design shares one block RAM.
//
// The published design places the scoreboard and register file in this module and
// says dependent operations are stalled by the scoreboard; the replay form of
// the stall, the operand and immediate packing and the schedule are this
// design's own.
module ip_dec
  import aports_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  // inst A-Port (consumer side)
  input  logic [INST_W:0]  inst_data,
  input  logic             inst_empty,
  input  logic             inst_heavy,
  output logic             inst_deq,
  // wbinfo A-Port (consumer side)
  input  logic [WB_W:0]    wb_data,
  input  logic             wb_empty,
  input  logic             wb_heavy,
  output logic             wb_deq,
  // decinst A-Port (producer side)
  output logic [DEC_W:0]   dec_data,
  input  logic             dec_full,
  input  logic             dec_light,
  output logic             dec_enq,
  // status
  output logic             idle,
  output logic             cycle_done,
  output logic             replay,      // a scoreboard stall was issued
  output logic [31:0]      busy_regs    // scoreboard, for observation
);

  logic start, write, busy, done;
  aport_ctrl #(.N_IN(2), .N_OUT(1)) u_ctrl (
    .clk, .rst_n, .mode, .step,
    .in_empty({wb_empty, inst_empty}), .in_heavy({wb_heavy, inst_heavy}),
    .out_full(dec_full), .out_light(dec_light),
    .done, .start, .write, .busy, .idle
  );
  assign inst_deq   = start;
  assign wb_deq     = start;
  assign dec_enq    = write;
  assign cycle_done = write;

  wb_msg_t   wbm;
  logic      wb_valid;
  assign wbm      = wb_msg_t'(wb_data[WB_W-1:0]);
  assign wb_valid = wb_data[WB_W];

  // decoded fields of one instruction
  typedef struct packed {
    op_t         op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic        wr;
    logic        use_rs;
    logic        use_rt;
    logic        b_is_imm;   // ALU operand b is the immediate
    logic [31:0] imm;
    logic [31:0] target;
  } decoded_t;

  function automatic decoded_t decode(input logic [31:0] ins, input logic [31:0] pc);
    decoded_t    d;
    logic [5:0]  opc, fn;
    logic [31:0] sext, zext, pc4;
    opc  = ins[31:26];
    fn   = ins[5:0];
    sext = {{16{ins[15]}}, ins[15:0]};
    zext = {16'h0, ins[15:0]};
    pc4  = pc + 32'd4;
    d = '{op: OP_NOP, rs: ins[25:21], rt: ins[20:16], rd: ins[20:16], wr: 1'b0,
          use_rs: 1'b0, use_rt: 1'b0, b_is_imm: 1'b1, imm: sext,
          target: pc4 + {sext[29:0], 2'b00}};
    unique case (opc)
      OPC_SPECIAL: begin
        d.rd = ins[15:11]; d.wr = 1'b1; d.use_rs = 1'b1; d.use_rt = 1'b1;
        d.b_is_imm = 1'b0;
        unique case (fn)
          FN_ADDU:  d.op = OP_ADD;
          FN_SUBU:  d.op = OP_SUB;
          FN_AND:   d.op = OP_AND;
          FN_OR:    d.op = OP_OR;
          FN_XOR:   d.op = OP_XOR;
          FN_NOR:   d.op = OP_NOR;
          FN_SLT:   d.op = OP_SLT;
          FN_SLTU:  d.op = OP_SLTU;
          FN_SLL, FN_SRL, FN_SRA: begin
            d.op = (fn == FN_SLL) ? OP_SLL : (fn == FN_SRL) ? OP_SRL : OP_SRA;
            d.use_rs = 1'b0;
            d.imm = {27'h0, ins[10:6]};
          end
          FN_JR:    begin d.op = OP_JR;   d.wr = 1'b0; d.use_rt = 1'b0; end
          FN_BREAK: begin d.op = OP_HALT; d.wr = 1'b0; d.use_rs = 1'b0; d.use_rt = 1'b0; end
          default:  begin d.op = OP_NOP;  d.wr = 1'b0; d.use_rs = 1'b0; d.use_rt = 1'b0; end
        endcase
      end
      OPC_ADDIU: begin d.op = OP_ADD;  d.wr = 1'b1; d.use_rs = 1'b1; end
      OPC_SLTI:  begin d.op = OP_SLT;  d.wr = 1'b1; d.use_rs = 1'b1; end
      OPC_SLTIU: begin d.op = OP_SLTU; d.wr = 1'b1; d.use_rs = 1'b1; end
      OPC_ANDI:  begin d.op = OP_AND;  d.wr = 1'b1; d.use_rs = 1'b1; d.imm = zext; end
      OPC_ORI:   begin d.op = OP_OR;   d.wr = 1'b1; d.use_rs = 1'b1; d.imm = zext; end
      OPC_XORI:  begin d.op = OP_XOR;  d.wr = 1'b1; d.use_rs = 1'b1; d.imm = zext; end
      OPC_LUI:   begin d.op = OP_LUI;  d.wr = 1'b1; d.imm = {ins[15:0], 16'h0}; end
      OPC_LW:    begin d.op = OP_LW;   d.wr = 1'b1; d.use_rs = 1'b1; end
      OPC_SW:    begin d.op = OP_SW;   d.use_rs = 1'b1; d.use_rt = 1'b1; d.b_is_imm = 1'b0; end
      OPC_BEQ:   begin d.op = OP_BEQ;  d.use_rs = 1'b1; d.use_rt = 1'b1; d.b_is_imm = 1'b0; end
      OPC_BNE:   begin d.op = OP_BNE;  d.use_rs = 1'b1; d.use_rt = 1'b1; d.b_is_imm = 1'b0; end
      OPC_J:     begin d.op = OP_J;    d.target = {pc4[31:28], ins[25:0], 2'b00}; end
      OPC_JAL:   begin d.op = OP_JAL;  d.wr = 1'b1; d.rd = 5'd31;
                       d.target = {pc4[31:28], ins[25:0], 2'b00}; end
      default:   d.op = OP_NOP;
    endcase
    if (d.rd == 5'd0) d.wr = 1'b0;  // r0 is never written
    return d;
  endfunction

  logic       iv_q;
  inst_msg_t  im_q;
  decoded_t   dq, dn;
  logic [2:0] ph_q;
  logic [31:0] sb_q, a_q;
  logic       wait_q, wait_epoch_q;
  logic       out_valid_q;
  dec_msg_t   out_q;
  logic       hazard, drop;

  assign busy_regs = sb_q;
  assign dn     = decode(im_q.instr, im_q.pc);
  assign drop   = wait_q && (im_q.epoch == wait_epoch_q);
  assign hazard = (dn.use_rs && sb_q[dn.rs]) || (dn.use_rt && sb_q[dn.rt]) ||
                  (dn.wr && sb_q[dn.rd]);

  // Register file
  logic        rf_re, rf_we;
  logic [4:0]  rf_ra;
  logic [31:0] rf_rd;
  assign rf_we = start & wb_valid & wbm.wr & (wbm.rd != 5'd0);
  assign rf_re = ((ph_q == 3'd1) && iv_q && !drop && !hazard) || (ph_q == 3'd2);
  assign rf_ra = (ph_q == 3'd1) ? dn.rs : dq.rt;
  bram_1r1w #(.DEPTH(32), .WIDTH(32)) u_rf (
    .clk, .rd_en(rf_re), .rd_addr(rf_ra), .rd_data(rf_rd),
    .wr_en(rf_we), .wr_addr(wbm.rd), .wr_data(wbm.value)
  );

  assign done     = (ph_q == 3'd4);
  assign dec_data = {out_valid_q, out_q};
  assign replay   = (ph_q == 3'd1) && iv_q && !drop && hazard;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph_q         <= 3'd0;
      iv_q         <= 1'b0;
      im_q         <= '0;
      dq           <= '0;
      sb_q         <= '0;
      a_q          <= '0;
      wait_q       <= 1'b0;
      wait_epoch_q <= 1'b0;
      out_valid_q  <= 1'b0;
      out_q        <= '0;
    end else begin
      unique case (ph_q)
        3'd0: if (start) begin
          iv_q <= inst_data[INST_W];
          im_q <= inst_msg_t'(inst_data[INST_W-1:0]);
          if (wb_valid) sb_q[wbm.rd] <= 1'b0;
          ph_q <= 3'd1;
        end
        3'd1: begin
          out_q <= '0;
          if (!iv_q || drop) begin
            out_valid_q <= 1'b0;
            ph_q        <= 3'd4;
          end else if (hazard) begin
            wait_q       <= 1'b1;
            wait_epoch_q <= im_q.epoch;
            out_valid_q  <= 1'b1;
            out_q.op     <= OP_REPLAY;
            out_q.pc     <= im_q.pc;
            out_q.epoch  <= im_q.epoch;
            ph_q         <= 3'd4;
          end else begin
            wait_q <= 1'b0;
            dq     <= dn;
            if (dn.wr) sb_q[dn.rd] <= 1'b1;
            ph_q   <= 3'd2;
          end
        end
        3'd2: begin
          a_q  <= dq.use_rs ? rf_rd : 32'h0;
          ph_q <= 3'd3;
        end
        3'd3: begin
          out_valid_q <= 1'b1;
          out_q <= '{op: dq.op, epoch: im_q.epoch, pc: im_q.pc, a: a_q,
                     b: dq.b_is_imm ? dq.imm : rf_rd, imm: dq.imm,
                     target: dq.target, rd: dq.rd, wr: dq.wr,
                     pred_npc: im_q.pred_npc, bht_ctr: im_q.bht_ctr};
          ph_q  <= 3'd4;
        end
        3'd4: if (write) ph_q <= 3'd0;
        default: ph_q <= 3'd0;
      endcase
    end
  end

endmodule
