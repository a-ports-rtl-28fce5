// ip_wb: write-back module of the 5-stage in-order pipeline model.
//
// Per model cycle it reads one message from the `result` A-Port (MEM) and
// writes one to the `wbinfo` A-Port (DEC). A result with a destination
// register becomes a register-file write in DEC; a squash (`kill`) message
// becomes a release of the register's scoreboard entry without a write. The
// module reads, simulates and writes in the same FPGA cycle (one FPGA cycle
// per model cycle when its ports allow).
//
// For observation it counts retired instructions (`instret`) and raises
// `halted` once a BREAK instruction retires. These are outputs for the user
// of the model; nothing in the model depends on them, and no module keeps a
// model-cycle counter.
//
// The published design names this module and its wbinfo port to DEC; the message
// contents and the retirement counter are this design's own.
module ip_wb
  import aports_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  // result A-Port (consumer side)
  input  logic [RES_W:0]   res_data,
  input  logic             res_empty,
  input  logic             res_heavy,
  output logic             res_deq,
  // wbinfo A-Port (producer side)
  output logic [WB_W:0]    wb_data,
  input  logic             wb_full,
  input  logic             wb_light,
  output logic             wb_enq,
  // status
  output logic             idle,
  output logic             cycle_done,
  output logic             halted,
  output logic [31:0]      instret
);

  logic start, write, busy, done;
  aport_ctrl #(.N_IN(1), .N_OUT(1)) u_ctrl (
    .clk, .rst_n, .mode, .step,
    .in_empty(res_empty), .in_heavy(res_heavy),
    .out_full(wb_full), .out_light(wb_light),
    .done, .start, .write, .busy, .idle
  );
  assign res_deq    = start;
  assign wb_enq     = write;
  assign cycle_done = write;

  // The result is handled in the start cycle; a full wbinfo port holds it.
  res_msg_t rh, r_q, r;
  logic     rv_q, rv;
  assign rh   = res_msg_t'(res_data[RES_W-1:0]);
  assign r    = start ? rh : r_q;
  assign rv   = start ? res_data[RES_W] : rv_q;
  assign done = 1'b1;

  wb_msg_t w;
  assign w       = '{rd: r.rd, value: r.value, wr: r.wr && !r.kill};
  assign wb_data = {rv && (r.wr || r.kill), w};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rv_q    <= 1'b0;
      r_q     <= '0;
      halted  <= 1'b0;
      instret <= '0;
    end else begin
      if (start) begin
        rv_q <= res_data[RES_W];
        r_q  <= rh;
      end
      if (write && rv && !r.kill) begin
        instret <= instret + 1'b1;
        if (r.halt) halted <= 1'b1;
      end
    end
  end

endmodule
