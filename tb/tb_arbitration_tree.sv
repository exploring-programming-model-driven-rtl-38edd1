// tb_arbitration_tree: self-checking test of the per-level request split.
// Random requests and levels; every request must appear in exactly the
// pass_priority vector of its level and nowhere else.
module tb_arbitration_tree;
  localparam int N = 6, M = 8;
  logic [N-1:0] ctrl_in;
  logic [2:0]   qos_priority [N];
  logic [N-1:0] pass_priority [M];
  int checks = 0, failures = 0;

  arbitration_tree #(.N(N), .NUM_LEVELS(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      ctrl_in = N'($urandom);
      for (int i = 0; i < N; i++) qos_priority[i] = 3'($urandom);
      #1;
      for (int m = 0; m < M; m++)
        for (int i = 0; i < N; i++) begin
          bit exp;
          exp = ctrl_in[i] && (qos_priority[i] == 3'(m));
          checks++;
          if (pass_priority[m][i] !== exp) begin
            failures++;
            $display("FAIL: level %0d input %0d", m, i);
          end
        end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
