// tb_qos_detector: self-checking test of the QoS tag detector.
// Drives random header and body flits with every QoS code and checks the
// level, open and close outputs for 8, 4 and 2 levels against a table
// written out independently.
module tb_qos_detector;
  import qos_noc_pkg::*;
  localparam int N = 6;
  flit_t flit_in [N];
  logic [N-1:0] ctrl_in;
  logic [2:0] pr8 [N];
  logic [1:0] pr4 [N];
  logic [0:0] pr2 [N];
  logic [N-1:0] op8, cl8, op4, cl4, op2, cl2;
  int checks = 0, failures = 0;

  qos_detector #(.N(N), .NUM_LEVELS(8)) d8 (.flit_in, .ctrl_in, .qos_priority(pr8), .open_circuit(op8), .close_circuit(cl8));
  qos_detector #(.N(N), .NUM_LEVELS(4)) d4 (.flit_in, .ctrl_in, .qos_priority(pr4), .open_circuit(op4), .close_circuit(cl4));
  qos_detector #(.N(N), .NUM_LEVELS(2)) d2 (.flit_in, .ctrl_in, .qos_priority(pr2), .open_circuit(op2), .close_circuit(cl2));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected 8-level priority for each 4-bit code
  function automatic int exp_level(logic [3:0] q);
    case (q)
      4'd0: return 0; 4'd1: return 1; 4'd2: return 2; 4'd3: return 3;
      4'd4: return 4; 4'd5: return 5; 4'd6: return 6; 4'd7: return 7;
      4'd8, 4'd9: return 7;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [3:0] codes [N];
      for (int i = 0; i < N; i++) begin
        codes[i] = n < 16 ? 4'(n) : 4'($urandom_range(0, 15));
        flit_in[i].head = (n < 16) ? 1'b1 : 1'($urandom_range(0, 1));
        flit_in[i].tail = 1'($urandom_range(0, 1));
        flit_in[i].data = {codes[i], 28'($urandom)};
      end
      ctrl_in = (n < 16) ? '1 : N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        bit hd;
        hd = ctrl_in[i] && flit_in[i].head;
        check(op8[i] == (hd && codes[i] == 4'b1000), "open flag");
        check(cl8[i] == (hd && codes[i] == 4'b1001), "close flag");
        check(op4[i] == op8[i] && op2[i] == op8[i] && cl4[i] == cl8[i] && cl2[i] == cl8[i], "flags independent of level count");
        check(int'(pr8[i]) == exp_level(codes[i]), $sformatf("8-level priority of code %0d", codes[i]));
        check(int'(pr4[i]) == exp_level(codes[i]) / 2, "4-level priority");
        check(int'(pr2[i]) == exp_level(codes[i]) / 4, "2-level priority");
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
