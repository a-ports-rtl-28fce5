// tb_ip_mem: self-checking test of the memory model module.
// The data memory is preloaded through the host port. Then a stream of
// random stores, loads, pass-through results and squash messages is queued
// on the execres A-Port; the result A-Port must carry load data from a
// reference memory, pass other messages unchanged, and never write memory
// for a squashed message. Each model cycle must take two FPGA cycles.
//
// A one-cycle data memory for loads and stores follows the published design;
// word addressing, the kill handling and the host port checked here are this
// design's own choices. Each message sent is one model cycle of the module.
module tb_ip_mem;
  import aports_pkg::*;
  localparam int unsigned DW = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  sim_mode_t mode;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [EXE_W:0] in_sd, in_rd;
  logic [RES_W:0] out_sd, out_rd;
  logic in_send, in_full, in_heavy, in_deq, in_empty, in_light;
  logic out_enq, out_full, out_heavy, out_recv, out_empty, out_light;
  logic idle, cycle_done;
  logic host_en, host_we;
  logic [5:0] host_addr;
  logic [31:0] host_wdata, host_rdata;

  a_port #(.W(EXE_W), .L(0), .K(4)) u_in (
    .clk, .rst_n, .send_en(in_send), .send_data(in_sd), .full(in_full), .heavy(in_heavy),
    .recv_en(in_deq), .recv_data(in_rd), .empty(in_empty), .light(in_light), .balanced(), .elems());
  a_port #(.W(RES_W), .L(0), .K(4)) u_out (
    .clk, .rst_n, .send_en(out_enq), .send_data(out_sd), .full(out_full), .heavy(out_heavy),
    .recv_en(out_recv), .recv_data(out_rd), .empty(out_empty), .light(out_light), .balanced(), .elems());

  ip_mem #(.DMEM_WORDS(DW)) dut (
    .clk, .rst_n, .mode, .step(1'b0),
    .exe_data(in_rd), .exe_empty(in_empty), .exe_heavy(in_heavy), .exe_deq(in_deq),
    .res_data(out_sd), .res_full(out_full), .res_light(out_light), .res_enq(out_enq),
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata, .idle, .cycle_done
  );

  logic [31:0] refm [DW];
  logic        exp_v [$];
  res_msg_t    exp_m [$];
  int          n_out = 0, n_done = 0, first_done = -1, last_done = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cycle_done) begin
      n_done <= n_done + 1;
      if (first_done < 0) first_done <= cyc;
      last_done <= cyc;
    end
  end

  // consumer: always drains the result port and checks in order
  always @(negedge clk) begin
    out_recv = 0;
    if (rst_n && !out_empty) begin
      logic v; res_msg_t e, g;
      v = exp_v.pop_front(); e = exp_m.pop_front();
      g = res_msg_t'(out_rd[RES_W-1:0]);
      check(out_rd[RES_W] == v && (!v || g == e),
            $sformatf("result %0d: got %b/%h expected %b/%h", n_out, out_rd[RES_W], g, v, e));
      n_out++;
      out_recv = 1;
    end
  end

  exe_msg_t m;
  logic v;
  int nmsg, kind;
  initial begin
    rst_n = 0; mode = MODE_RUN; in_send = 0; in_sd = '0; out_recv = 0;
    host_en = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < DW; i++) begin
      refm[i] = $urandom;
      host_en = 1; host_we = 1; host_addr = 6'(i); host_wdata = refm[i];
      @(negedge clk);
    end
    host_en = 0; host_we = 0;
    rst_n = 1;
    nmsg = 600;
    for (int t = 0; t < nmsg; t++) begin
      m = '0;
      v = $urandom_range(0, 7) != 0;
      m.addr = {24'h0, 6'($urandom), 2'b00};
      m.value = $urandom;
      m.rd = 5'($urandom_range(1, 31));
      kind = $urandom_range(0, 3);
      unique case (kind)
        0: begin m.mem_op = MEM_STORE; m.wr = 0; end
        1: begin m.mem_op = MEM_LOAD;  m.wr = 1; end
        2: begin m.mem_op = MEM_NONE;  m.wr = 1; end
        3: begin m.mem_op = MEM_STORE; m.kill = 1; m.wr = 0; end  // squashed: no write
      endcase
      exp_v.push_back(v);
      exp_m.push_back('{value: (v && m.mem_op == MEM_LOAD && !m.kill) ? refm[m.addr[7:2]] : m.value,
                        rd: m.rd, wr: m.wr, kill: m.kill, halt: 1'b0});
      if (v && m.mem_op == MEM_STORE && !m.kill) refm[m.addr[7:2]] = m.value;
      while (in_full) @(negedge clk);
      in_send = 1; in_sd = {v, m};
      @(negedge clk);
      in_send = 0;
    end
    while (n_out < nmsg) @(negedge clk);
    check(last_done - first_done == 2 * (nmsg - 1),
          $sformatf("%0d model cycles in %0d FPGA cycles (2 per model cycle expected)",
                    nmsg, last_done - first_done + 2));
    // final memory contents via the host port
    for (int i = 0; i < DW; i++) begin
      host_en = 1; host_we = 0; host_addr = 6'(i);
      @(negedge clk);
      check(host_rdata == refm[i], $sformatf("dmem[%0d]=%h expected %h", i, host_rdata, refm[i]));
    end
    host_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
