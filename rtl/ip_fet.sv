// ip_fet: fetch module of the 5-stage in-order pipeline model.
//
// Holds the model's program counter, the instruction memory, the branch
// predictor (a table of 2-bit counters) and the branch target buffer, each in
// a block RAM. Per model cycle it reads one message from the `resteer` A-Port
// (written by EXE) and writes one instruction to the `inst` A-Port (read by
// DEC).
//
// One model cycle takes three FPGA cycles (plus any wait for a full output):
//   start : dequeue resteer; apply its predictor/target updates; choose the
//           fetch pc (the redirect target if there is one, else the current
//           pc, with a flip of the epoch bit on a redirect); present the pc to
//           the instruction memory, predictor and target buffer.
//   ph 1  : RAM words arrive; predict the next pc (target-buffer hit and
//           either a jump or a taken counter -> target, else pc+4); build the
//           inst message.
//   ph 2  : `done`; the message is written when the inst port is not full.
// The epoch bit lets later modules recognise instructions fetched before a
// redirect.
//
// The published design gives the contents of this module (pc, instruction memory,
// predictor, target buffer, block RAMs) and the update of the predictor after
// branch resolution. Table sizes, the counter scheme, the target-buffer
// format, the epoch mechanism and the phase schedule are this design's own.
// `imem_we/imem_waddr/imem_wdata` load the program (word addresses).
// Fetch produces an instruction every model cycle, so the valid bit of
// `inst_data` is always 1 (Message); wrong-path instructions are marked by
// their epoch, not by NoMessage. Synthesis reports that bit as constant.
module ip_fet
  import aports_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned BHT_ENTRIES = 256,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter logic [31:0] RESET_PC    = 32'h0,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned HAW = $clog2(BHT_ENTRIES),
  localparam int unsigned TAW = $clog2(BTB_ENTRIES),
  localparam int unsigned TAGW = 30 - TAW,
  localparam int unsigned BTBW = 1 + TAGW + 32 + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  // resteer A-Port (consumer side)
  input  logic [RESTEER_W:0] rs_data,
  input  logic             rs_empty,
  input  logic             rs_heavy,
  output logic             rs_deq,
  // inst A-Port (producer side)
  output logic [INST_W:0]  inst_data,
  input  logic             inst_full,
  input  logic             inst_light,
  output logic             inst_enq,
  // program load
  input  logic             imem_we,
  input  logic [IAW-1:0]   imem_waddr,
  input  logic [31:0]      imem_wdata,
  // status
  output logic             idle,
  output logic             cycle_done,
  output logic             redirected   // a redirect was applied this model cycle
);

  typedef struct packed {
    logic            valid;
    logic [TAGW-1:0] tag;
    logic [31:0]     target;
    logic            is_jump;
  } btb_entry_t;

  logic start, write, busy, done;
  aport_ctrl #(.N_IN(1), .N_OUT(1)) u_ctrl (
    .clk, .rst_n, .mode, .step,
    .in_empty(rs_empty), .in_heavy(rs_heavy),
    .out_full(inst_full), .out_light(inst_light),
    .done, .start, .write, .busy, .idle
  );

  assign rs_deq     = start;
  assign inst_enq   = write;
  assign cycle_done = write;

  resteer_msg_t rsm;
  logic         rs_valid;
  assign rsm      = resteer_msg_t'(rs_data[RESTEER_W-1:0]);
  assign rs_valid = rs_data[RESTEER_W];

  logic [31:0] pc_q, fpc_q, fetch_pc;
  logic        epoch_q, redir;
  logic [1:0]  ph_q;
  inst_msg_t   msg_q;

  assign redir    = rs_valid & rsm.redirect;
  assign fetch_pc = redir ? rsm.npc : pc_q;

  // Block RAMs
  logic [31:0] imem_rd;
  logic [1:0]  bht_rd;
  logic [BTBW-1:0] btb_rd;
  btb_entry_t  btb_e, btb_w;

  bram_1r1w #(.DEPTH(IMEM_WORDS), .WIDTH(32)) u_imem (
    .clk, .rd_en(start), .rd_addr(fetch_pc[2 +: IAW]), .rd_data(imem_rd),
    .wr_en(imem_we), .wr_addr(imem_waddr), .wr_data(imem_wdata)
  );
  bram_1r1w #(.DEPTH(BHT_ENTRIES), .WIDTH(2)) u_bht (
    .clk, .rd_en(start), .rd_addr(fetch_pc[2 +: HAW]), .rd_data(bht_rd),
    .wr_en(start & rs_valid & rsm.upd_bht), .wr_addr(rsm.br_pc[2 +: HAW]),
    .wr_data(rsm.new_ctr)
  );
  assign btb_w = '{valid: 1'b1, tag: rsm.br_pc[31 -: TAGW], target: rsm.target,
                   is_jump: rsm.is_jump};
  bram_1r1w #(.DEPTH(BTB_ENTRIES), .WIDTH(BTBW)) u_btb (
    .clk, .rd_en(start), .rd_addr(fetch_pc[2 +: TAW]), .rd_data(btb_rd),
    .wr_en(start & rs_valid & rsm.upd_btb), .wr_addr(rsm.br_pc[2 +: TAW]),
    .wr_data(btb_w)
  );
  assign btb_e = btb_entry_t'(btb_rd);

  // Prediction in phase 1
  logic        btb_hit, pred_taken;
  logic [31:0] pred_npc;
  assign btb_hit    = btb_e.valid && (btb_e.tag == fpc_q[31 -: TAGW]);
  assign pred_taken = btb_hit && (btb_e.is_jump || bht_rd[1]);
  assign pred_npc   = pred_taken ? btb_e.target : fpc_q + 32'd4;

  assign done      = (ph_q == 2'd2);
  assign inst_data = {1'b1, msg_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q       <= RESET_PC;
      fpc_q      <= RESET_PC;
      epoch_q    <= 1'b0;
      ph_q       <= 2'd0;
      msg_q      <= '0;
      redirected <= 1'b0;
    end else begin
      if (start) begin
        fpc_q      <= fetch_pc;
        redirected <= redir;
        if (redir) epoch_q <= ~epoch_q;
        ph_q       <= 2'd1;
      end else if (ph_q == 2'd1) begin
        msg_q <= '{pc: fpc_q, instr: imem_rd, pred_npc: pred_npc,
                   bht_ctr: bht_rd, epoch: epoch_q};
        pc_q  <= pred_npc;
        ph_q  <= 2'd2;
      end else if (write) begin
        ph_q  <= 2'd0;
      end
    end
  end

endmodule
