// tb_flit_fifo: self-checking test of the switch input buffer.
// Random pushes and pops against a queue model; checks data order, that
// the buffer reports full after DEPTH words, empty when drained, and that a
// word written is visible at the head on the following cycle.
module tb_flit_fifo;
  localparam int W = 34, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(!out_valid && in_ready, "empty after reset");
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      in_valid <= 1; in_data <= W'(i + 100);
      @(posedge clk); q.push_back(W'(i + 100));
      #1 check(out_valid && out_data == q[0], "head visible one cycle after write");
    end
    in_valid <= 0;
    #1 check(!in_ready, "full after DEPTH writes");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] d;
      d = {$urandom, $urandom};
      in_valid  <= $urandom_range(0, 1);
      in_data   <= d;
      out_ready <= $urandom_range(0, 1);
      #1;
      if (out_valid) check(out_data == q[0], "data order");
      check(in_ready == (q.size() < DEPTH), "ready equals not full");
      check(out_valid == (q.size() > 0), "valid equals not empty");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    in_valid <= 0; out_ready <= 1;
    while (q.size() > 0) begin
      #1 check(out_valid && out_data == q[0], "drain order");
      @(posedge clk); void'(q.pop_front());
    end
    #1 check(!out_valid, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
