// tb_shared_memory: self-checking test of the memory bank.
// Random writes and reads against an associative-array model; read data
// must appear exactly one cycle after the read and hold afterwards.
module tb_shared_memory;
  localparam int AW = 10, DW = 32;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [int];

  shared_memory #(.AW(AW), .DW(DW)) dut (.*);
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
    @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      en <= 1; we <= 1; addr <= AW'(i * 16 + 3); wdata <= $urandom;
      @(posedge clk); model[int'(addr)] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = model.size() > 0 && $urandom_range(0, 3) != 0 ? ($urandom_range(0, 63) * 16 + 3) : $urandom_range(0, 2**AW - 1);
      en <= 1; addr <= AW'(a);
      if ($urandom_range(0, 2) == 0) begin
        we <= 1; wdata <= $urandom;
        @(posedge clk); model[a] = wdata;
      end else begin
        we <= 0;
        @(posedge clk);
        en <= 0;
        #1;
        if (model.exists(a)) check(rdata == model[a], $sformatf("read addr %0d", a));
        @(posedge clk);
        #1 if (model.exists(a)) check(rdata == model[a], "read data holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
