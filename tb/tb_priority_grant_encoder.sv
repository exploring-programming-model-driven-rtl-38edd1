// tb_priority_grant_encoder: self-checking test of the grant generator.
// Random per-level requests and circuit bits. The model: with a circuit
// established only its owner is eligible; otherwise the highest non-empty
// level wins; inside it the first requester at or after the round-robin
// pointer, which moves past the winner when advance is high.
module tb_priority_grant_encoder;
  localparam int N = 6, M = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pass_priority [M];
  logic [N-1:0] qos_channel = '0, selection;
  logic advance = 0;
  int checks = 0, failures = 0;
  int ptr;
  int n_circuit = 0, n_level = 0;

  priority_grant_encoder #(.N(N), .NUM_LEVELS(M), .ARB_RR(1'b1)) dut (.*);
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
    for (int m = 0; m < M; m++) pass_priority[m] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    ptr = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [N-1:0] cand, exp;
      int top;
      for (int m = 0; m < M; m++) pass_priority[m] = ($urandom_range(0, 3) == 0) ? N'($urandom) : '0;
      qos_channel = ($urandom_range(0, 4) == 0) ? N'(1 << $urandom_range(0, N - 1)) : '0;
      advance = $urandom_range(0, 1);
      cand = '0;
      top  = -1;
      if (qos_channel != 0) begin
        for (int m = 0; m < M; m++) cand |= pass_priority[m] & qos_channel;
        n_circuit++;
      end else begin
        for (int m = M - 1; m >= 0; m--) if (top < 0 && pass_priority[m] != 0) begin top = m; cand = pass_priority[m]; end
        if (top > 0) n_level++;
      end
      exp = '0;
      for (int k = 0; k < N; k++) if (exp == 0 && cand[(ptr + k) % N]) exp[(ptr + k) % N] = 1'b1;
      #1 check(selection == exp, $sformatf("selection %b expected %b", selection, exp));
      @(posedge clk);
      if (advance && exp != 0) for (int i = 0; i < N; i++) if (exp[i]) ptr = (i + 1) % N;
      #1;
    end
    check(n_circuit > 0 && n_level > 0, "both circuit and level cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
