// tb_qos_channel_ff: self-checking test of the QoS channel flip-flops.
// Random open/close/grant patterns against a bit model: a bit is set only
// by a granted OPEN and cleared only by a granted CLOSE; reset clears all.
module tb_qos_channel_ff;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] open_circuit = '0, close_circuit = '0, grant_fire = '0, qos_channel;
  logic [N-1:0] model;
  int checks = 0, failures = 0;

  qos_channel_ff #(.N(N)) dut (.*);
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
    model = '0;
    @(posedge clk);
    #1 check(qos_channel == '0, "clear after reset");
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] o, c;
      o = N'($urandom) & N'($urandom);
      c = N'($urandom) & ~o;
      open_circuit <= o; close_circuit <= c; grant_fire <= N'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (grant_fire[i] && open_circuit[i]) model[i] = 1'b1;
        else if (grant_fire[i] && close_circuit[i]) model[i] = 1'b0;
      end
      #1 check(qos_channel == model, $sformatf("channel bits %b expected %b", qos_channel, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
