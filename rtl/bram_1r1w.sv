// bram_1r1w: block RAM with one read port and one write port.
//
// This is the FPGA memory the models are built from (instruction and data
// memory, register files, branch predictor and branch target buffer). The
// read is synchronous: the word addressed in one clock cycle appears on
// `rd_data` in the next and stays there until the next read. A read and a
// write to the same address in the same cycle return the old word. Contents
// start at zero, set by an initial block, which maps to the power-up
// contents of an FPGA block RAM.
//
// Building every large model structure from 1-read/1-write block RAMs, and
// the read value appearing one FPGA cycle after the address, follow the
// published design; depth, width, read-during-write behaviour and zero
// initialisation are this design's choices.
module bram_1r1w #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
