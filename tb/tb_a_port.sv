// tb_a_port: self-checking test of the A-Port FIFO.
//
// Two ports are exercised: a latency-2 port with 3 extra slots (one lane) and
// a latency-1 port with bandwidth 2 (two lanes). For each it checks the reset
// contents (L elements of NoMessage in every lane), then applies random
// writes and reads (never a write when full nor a read when empty, as the
// protocol requires) and compares data order and the
// heavy/light/balanced/full/empty flags with a reference queue.
//
// The reset contents, the l+1 buffering rule and the flag definitions checked here
// are the published A-Port rules; the port sizes, the 8-bit payload and the random
// traffic mix are this testbench's own choices. Stimulus changes on the falling
// edge, and the port's outputs are compared after each rising edge.
module tb_a_port;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- port A: L=2, K=3, B=1 ----
  localparam int unsigned LA = 2, KA = 3;
  logic            a_send, a_recv, a_full, a_heavy, a_empty, a_light, a_bal;
  logic [0:0][W:0] a_sd, a_rd;
  logic [2:0]      a_elems;
  a_port #(.W(W), .L(LA), .K(KA), .B(1)) u_a (
    .clk, .rst_n, .send_en(a_send), .send_data(a_sd), .full(a_full), .heavy(a_heavy),
    .recv_en(a_recv), .recv_data(a_rd), .empty(a_empty), .light(a_light),
    .balanced(a_bal), .elems(a_elems)
  );

  // ---- port B: L=1, K=1, B=2 ----
  logic            b_send, b_recv, b_full, b_heavy, b_empty, b_light, b_bal;
  logic [1:0][W:0] b_sd, b_rd;
  logic [1:0]      b_elems;
  a_port #(.W(W), .L(1), .K(1), .B(2)) u_b (
    .clk, .rst_n, .send_en(b_send), .send_data(b_sd), .full(b_full), .heavy(b_heavy),
    .recv_en(b_recv), .recv_data(b_rd), .empty(b_empty), .light(b_light),
    .balanced(b_bal), .elems(b_elems)
  );

  logic [W:0] q [$];
  logic [W:0] v;
  int n;

  initial begin
    rst_n = 1'b0;
    a_send = 0; a_recv = 0; a_sd = '0;
    b_send = 0; b_recv = 0; b_sd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // reset contents
    check(a_elems == 3'(LA) && a_bal && !a_heavy && !a_light && !a_empty && !a_full,
          "port A starts balanced with L elements");
    check(b_elems == 2'd1 && b_bal, "port B starts balanced with L elements");
    check(b_rd[0][W] == 1'b0 && b_rd[1][W] == 1'b0, "port B head holds L*B NoMessages");
    for (int i = 0; i < LA; i++) q.push_back('0);  // reference: L NoMessages

    // random traffic on port A
    for (int t = 0; t < 3000; t++) begin
      bit do_s, do_r;
      n = q.size();
      do_s = ($urandom_range(0, 1) == 1) && (n < LA + KA);
      do_r = ($urandom_range(0, 1) == 1) && (n > 0);
      // flags against the reference count
      check(a_full == (n == LA + KA) && a_empty == (n == 0) && a_bal == (n == LA) &&
            a_heavy == (n > LA) && a_light == (n < LA) && a_elems == 3'(n),
            $sformatf("port A flags at count %0d", n));
      if (do_r) begin
        v = q.pop_front();
        check(a_rd[0] == v, $sformatf("port A data %h expected %h", a_rd[0], v));
      end
      a_send = do_s;
      a_recv = do_r;
      if (do_s) begin
        a_sd[0] = {1'($urandom_range(0, 1)), W'($urandom)};
        q.push_back(a_sd[0]);
      end
      @(negedge clk);
      a_send = 0; a_recv = 0;
    end

    // port B: two lanes travel together; the NoMessage element is read first
    b_sd[0] = {1'b1, 8'h11}; b_sd[1] = {1'b0, 8'h22}; b_send = 1;
    @(negedge clk); b_send = 0;
    check(b_full && b_heavy, "port B full and heavy after one write beyond L");
    b_recv = 1; @(negedge clk); b_recv = 0;
    check(b_bal, "port B balanced again");
    check(b_rd[0] == {1'b1, 8'h11} && b_rd[1] == {1'b0, 8'h22}, "port B lanes kept together");
    b_recv = 1; @(negedge clk); b_recv = 0;
    check(b_empty && b_light, "port B empty and light after draining");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
