// ip_mem: memory module of the 5-stage in-order pipeline model.
//
// Contains the data memory, a block RAM modelling the target's one-cycle
// ("magic") memory. Per model cycle it reads one message from the `execres`
// A-Port (EXE) and writes one to the `result` A-Port (WB). A load reads the
// word at the message's address, a store writes it; everything else, and
// squash (`kill`) messages, pass through unchanged.
//
// FPGA schedule: start (dequeue; the RAM read or write is issued with the
// head of the port), ph 1 (load data present, `done`). Two FPGA cycles per
// model cycle.
//
// The host port (`host_*`, word addresses) loads and inspects the data memory
// while the model is paused; it takes the RAM ports over whenever `host_en`
// is high and must not be used while the model simulates.
//
// The published design gives the data memory's place in this module and the
// one-cycle memory of the target; the word-only access, the address
// wrap-around to the memory size and the host port are this design's own.
module ip_mem
  import aports_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024,
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  // execres A-Port (consumer side)
  input  logic [EXE_W:0]   exe_data,
  input  logic             exe_empty,
  input  logic             exe_heavy,
  output logic             exe_deq,
  // result A-Port (producer side)
  output logic [RES_W:0]   res_data,
  input  logic             res_full,
  input  logic             res_light,
  output logic             res_enq,
  // host access to the data memory
  input  logic             host_en,
  input  logic             host_we,
  input  logic [DAW-1:0]   host_addr,
  input  logic [31:0]      host_wdata,
  output logic [31:0]      host_rdata,
  // status
  output logic             idle,
  output logic             cycle_done
);

  logic start, write, busy, done;
  aport_ctrl #(.N_IN(1), .N_OUT(1)) u_ctrl (
    .clk, .rst_n, .mode, .step,
    .in_empty(exe_empty), .in_heavy(exe_heavy),
    .out_full(res_full), .out_light(res_light),
    .done, .start, .write, .busy, .idle
  );
  assign exe_deq    = start;
  assign res_enq    = write;
  assign cycle_done = write;
  assign done       = busy;

  exe_msg_t eh, e_q;
  logic     ev_q;
  assign eh = exe_msg_t'(exe_data[EXE_W-1:0]);

  logic        live_h;
  logic        ram_re, ram_we;
  logic [DAW-1:0] ram_ra, ram_wa;
  logic [31:0] ram_rd, ram_wd;
  assign live_h = start && exe_data[EXE_W] && !eh.kill;

  always_comb begin
    if (host_en) begin
      ram_re = !host_we;
      ram_ra = host_addr;
      ram_we = host_we;
      ram_wa = host_addr;
      ram_wd = host_wdata;
    end else begin
      ram_re = live_h && (eh.mem_op == MEM_LOAD);
      ram_ra = eh.addr[2 +: DAW];
      ram_we = live_h && (eh.mem_op == MEM_STORE);
      ram_wa = eh.addr[2 +: DAW];
      ram_wd = eh.value;
    end
  end

  bram_1r1w #(.DEPTH(DMEM_WORDS), .WIDTH(32)) u_dmem (
    .clk, .rd_en(ram_re), .rd_addr(ram_ra), .rd_data(ram_rd),
    .wr_en(ram_we), .wr_addr(ram_wa), .wr_data(ram_wd)
  );
  assign host_rdata = ram_rd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_q <= 1'b0;
      e_q  <= '0;
    end else if (start) begin
      ev_q <= exe_data[EXE_W];
      e_q  <= eh;
    end
  end

  res_msg_t r;
  always_comb begin
    r = '{value: e_q.value, rd: e_q.rd, wr: e_q.wr, kill: e_q.kill, halt: e_q.halt};
    if (e_q.mem_op == MEM_LOAD && !e_q.kill) r.value = ram_rd;
  end
  assign res_data = {ev_q, r};

endmodule
