// aport_ctrl: the A-Ports protocol of one model module.
//
// Every model module simulates model cycles in the order
//   ready to simulate -> read inputs -> simulate model cycle -> write outputs
// and decides on its own, from the status of its own A-Ports, when to begin
// the next model cycle. There is no central controller and no model-cycle
// counter. This controller makes that decision and sequences the module:
//
//   * A cycle may begin when every input A-Port is non-empty. In MODE_RESYNC
//     it must in addition be behind a neighbour: some input port heavy or some
//     output port light. In MODE_STEP it needs a pending step request (a
//     `step` pulse sets one request per module).
//   * `start` is high in the cycle the module begins: the module dequeues
//     every input A-Port in that cycle (recv_en = start) and latches the heads.
//   * The datapath raises `done` when its outputs for the model cycle are
//     ready; it may do so in the `start` cycle itself (read, simulate and
//     write in one FPGA cycle).
//   * `write` is high in the cycle the module enqueues every output A-Port
//     (send_en = write). It waits while any output port is full.
//
// `idle` is high when the module is between model cycles. `busy` is high from
// the cycle after `start` until `write`.
//
// The conditions are those of the published design's protocol diagrams, including
// the resynchronisation rule. The step-request latch, the signal names and
// the two-state encoding are this design's own choices. Reset is synchronous
// and active low.
module aport_ctrl
  import aports_pkg::*;
#(
  parameter int unsigned N_IN  = 1,  // number of input A-Ports (>= 1; tie unused)
  parameter int unsigned N_OUT = 1   // number of output A-Ports (>= 1; tie unused)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sim_mode_t        mode,
  input  logic             step,
  input  logic [N_IN-1:0]  in_empty,
  input  logic [N_IN-1:0]  in_heavy,
  input  logic [N_OUT-1:0] out_full,
  input  logic [N_OUT-1:0] out_light,
  input  logic             done,
  output logic             start,
  output logic             write,
  output logic             busy,
  output logic             idle
);

  typedef enum logic {S_READY, S_SIM} state_t;
  state_t state_q;
  logic   step_pending;
  logic   inputs_ready, behind, may_begin, can_write;

  assign inputs_ready = ~|in_empty;
  assign behind       = (|in_heavy) | (|out_light);
  assign can_write    = ~|out_full;

  always_comb begin
    unique case (mode)
      MODE_RUN:    may_begin = inputs_ready;
      MODE_RESYNC: may_begin = inputs_ready & behind;
      MODE_STEP:   may_begin = inputs_ready & step_pending;
      default:     may_begin = 1'b0;
    endcase
  end

  assign start = rst_n & (state_q == S_READY) & may_begin;
  assign write = ((state_q == S_SIM) | start) & done & can_write;
  assign busy  = (state_q == S_SIM);
  assign idle  = (state_q == S_READY);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_READY;
      step_pending <= 1'b0;
    end else begin
      if (start && !write) state_q <= S_SIM;
      else if (write)      state_q <= S_READY;

      if (mode != MODE_STEP) step_pending <= 1'b0;
      else if (step)         step_pending <= 1'b1;
      else if (start)        step_pending <= 1'b0;
    end
  end

endmodule
