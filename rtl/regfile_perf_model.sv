// regfile_perf_model: performance model of a 2-read/2-write register file.
//
// The target circuit is a register file with two read ports and two write
// ports whose read values appear in the same clock cycle as the address.
// Building that directly on an FPGA needs registers and wide multiplexers.
// This model instead keeps the contents in one block RAM with a single read
// port and a single write port, and spends several FPGA cycles on each
// simulated (model) cycle. The counter `cur_cc` holds the number of model
// cycles simulated so far and advances only once both reads and both writes
// of the model cycle are complete.
//
// Schedule of one model cycle (phase = FPGA cycle within it):
//   phase 0: sample all inputs; read address 1 goes to the RAM
//   phase 1: read address 2 goes to the RAM; read value 1 arrives
//   phase 2: read value 2 arrives; write 1 is performed
//   phase 3: write 2 is performed; rd_val1/rd_val2 and cur_cc update
// The reads are done before the writes, so a read returns the value the
// register held before the model cycle, as in the target. The FPGA-to-model
// cycle ratio is therefore 4. Inputs are sampled in phase 0 and outputs
// change at the end of phase 3 (`cc_done` marks that cycle), which is the
// unit-delay arrangement: a surrounding model holds its inputs stable and
// observes the outputs once every 4 FPGA cycles.
//
// The structure, the read-before-write order and the ratio of 4 follow the
// published design. Widths, depth, the write enables and the sampling of inputs in
// phase 0 are this design's choices. Two writes to the same register in one
// model cycle are excluded by the target's rules; here write 2 wins.
module regfile_perf_model #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned CCW   = 32,  // width of the model-cycle counter
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    rd_addr1,
  input  logic [AW-1:0]    rd_addr2,
  input  logic             wr_en1,
  input  logic [AW-1:0]    wr_addr1,
  input  logic [WIDTH-1:0] wr_val1,
  input  logic             wr_en2,
  input  logic [AW-1:0]    wr_addr2,
  input  logic [WIDTH-1:0] wr_val2,
  output logic [WIDTH-1:0] rd_val1,
  output logic [WIDTH-1:0] rd_val2,
  output logic [CCW-1:0]   cur_cc,
  output logic             cc_done
);

  logic [1:0]       phase;
  // inputs sampled in phase 0
  logic [AW-1:0]    ra2_q, wa1_q, wa2_q;
  logic             we1_q, we2_q;
  logic [WIDTH-1:0] wv1_q, wv2_q, rv1_q, rv2_q;

  logic             ram_re, ram_we;
  logic [AW-1:0]    ram_ra, ram_wa;
  logic [WIDTH-1:0] ram_rd, ram_wd;

  bram_1r1w #(.DEPTH(NREGS), .WIDTH(WIDTH)) u_ram (
    .clk, .rd_en(ram_re), .rd_addr(ram_ra), .rd_data(ram_rd),
    .wr_en(ram_we), .wr_addr(ram_wa), .wr_data(ram_wd)
  );

  always_comb begin
    ram_re = 1'b0;
    ram_ra = rd_addr1;
    ram_we = 1'b0;
    ram_wa = wa1_q;
    ram_wd = wv1_q;
    unique case (phase)
      2'd0: begin ram_re = 1'b1; ram_ra = rd_addr1; end
      2'd1: begin ram_re = 1'b1; ram_ra = ra2_q;    end
      2'd2: begin ram_we = we1_q; ram_wa = wa1_q; ram_wd = wv1_q; end
      2'd3: begin ram_we = we2_q; ram_wa = wa2_q; ram_wd = wv2_q; end
    endcase
  end

  assign cc_done = (phase == 2'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= 2'd0;
      cur_cc  <= '0;
      rd_val1 <= '0;
      rd_val2 <= '0;
      ra2_q   <= '0;
      wa1_q   <= '0;
      wa2_q   <= '0;
      we1_q   <= 1'b0;
      we2_q   <= 1'b0;
      wv1_q   <= '0;
      wv2_q   <= '0;
      rv1_q   <= '0;
      rv2_q   <= '0;
    end else begin
      phase <= phase + 2'd1;
      unique case (phase)
        2'd0: begin
          ra2_q <= rd_addr2;
          wa1_q <= wr_addr1;  wv1_q <= wr_val1;  we1_q <= wr_en1;
          wa2_q <= wr_addr2;  wv2_q <= wr_val2;  we2_q <= wr_en2;
        end
        2'd1: rv1_q <= ram_rd;
        2'd2: rv2_q <= ram_rd;
        2'd3: begin
          rd_val1 <= rv1_q;
          rd_val2 <= rv2_q;
          cur_cc  <= cur_cc + 1'b1;
        end
      endcase
    end
  end

endmodule
