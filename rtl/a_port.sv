// a_port: one A-Port, the only channel between two model modules.
//
// An A-Port is a FIFO of (W+1)-bit elements: W bits of message and one bit
// that tells a real Message (1) from NoMessage (0). The producer writes it
// exactly once per simulated model cycle and the consumer reads it exactly
// once per model cycle, so a message written on model cycle n is read on model
// cycle n+L. The FIFO holds L+K elements, where L is the model latency and K
// the extra slots that let the producer run ahead; K >= 1 is required so that
// the port holds at least L+1 elements (the deadlock-freedom rule). At reset
// it holds L elements of NoMessage, so the consumer can simulate its first L
// cycles at once.
//
// Bandwidth B > 1 is carried as B lanes per element: one element is one model
// cycle's worth of up to B messages, each lane with its own Message bit, so
// the reset contents are L*B NoMessages.
//
// The element count `elems` is compared with the constants of the port to
// report the model-time relation of the two modules:
//   balanced : elems == L     (both ends are on the same model cycle)
//   heavy    : elems >  L     (producer ahead of consumer)
//   light    : elems <  L     (consumer ahead of producer)
//   full     : elems == L+K   (producer may not write)
//   empty    : elems == 0     (consumer may not read)
// All flags come from the registered count. A write and a read may happen in
// the same clock cycle. The read data (head element) is valid whenever
// `empty` is low; `recv_en` pops it at the clock edge. Reset is synchronous
// and active low.
//
// Structure, flag comparators and reset contents follow the published design; the
// lane encoding of bandwidth and the circular-buffer implementation are this
// design's own choices.
module a_port #(
  parameter int unsigned W = 32,  // message width t
  parameter int unsigned L = 1,   // model latency l
  parameter int unsigned K = 1,   // extra buffering slots k (>= 1)
  parameter int unsigned B = 1,   // bandwidth b (lanes per element)
  localparam int unsigned D  = L + K,
  localparam int unsigned CW = $clog2(D + 1),
  localparam int unsigned PW = (D > 1) ? $clog2(D) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // producer side
  input  logic                send_en,
  input  logic [B-1:0][W:0]   send_data,
  output logic                full,
  output logic                heavy,
  // consumer side
  input  logic                recv_en,
  output logic [B-1:0][W:0]   recv_data,
  output logic                empty,
  output logic                light,
  // model-time status
  output logic                balanced,
  output logic [CW-1:0]       elems
);

  logic [B-1:0][W:0] buf_q [D];
  logic [PW-1:0]     rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(D - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= PW'(L % D);
      elems  <= CW'(L);
    end else begin
      if (send_en) wr_ptr <= next_ptr(wr_ptr);
      if (recv_en) rd_ptr <= next_ptr(rd_ptr);
      case ({send_en, recv_en})
        2'b10:   elems <= elems + 1'b1;
        2'b01:   elems <= elems - 1'b1;
        default: elems <= elems;
      endcase
    end
  end

  // Storage: the first L slots start as NoMessage (all-zero elements).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) buf_q[i] <= '0;
    end else if (send_en) begin
      buf_q[wr_ptr] <= send_data;
    end
  end

  assign recv_data = buf_q[rd_ptr];

  assign full     = (elems == CW'(D));
  assign empty    = (elems == '0);
  assign balanced = (elems == CW'(L));
  assign heavy    = (elems >  CW'(L));
  assign light    = (elems <  CW'(L));

  // Protocol rules of the port.
  initial begin
    assert (K >= 1) else $error("a_port: K must be at least 1 (L+1 buffering)");
  end
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(send_en && full))
    else $error("a_port: write to a full A-Port");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(recv_en && empty))
    else $error("a_port: read from an empty A-Port");

endmodule
