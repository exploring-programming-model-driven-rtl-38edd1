// tb_qos_allocator: self-checking test of one output's QoS allocator.
//
// Six inputs each hold a queue of packets (1-3 flits, random QoS levels).
// Input 0 and input 3 also open a reserved circuit, send traffic through
// it and close it again. The testbench presents each queue head as the
// buffer head and pops it when ctrl_out grants it, with random downstream
// stalls. It checks, against its own model: flits leave in order and
// unaltered; packets never interleave; a new packet never loses to a
// lower level (no circuit open); while a circuit is open only its owner
// moves; a free output with a waiting head flit is never idle. It also
// counts priority overtakes, circuit blocks and stalls, and fails if a
// mechanism never happened.
module tb_qos_allocator;
  import qos_noc_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  flit_t flit_in [N];
  logic [N-1:0] ctrl_in, ctrl_out, qos_channel;
  flit_t flit_out;
  logic out_valid, out_ready;
  int checks = 0, failures = 0;
  flit_t q [N][$];
  int model_owner;     // input holding the output between head and tail, -1 if none
  int model_ch;        // input owning an open circuit, -1 if none
  int n_overtake = 0, n_block = 0, n_stall = 0, n_circuit = 0, n_flits = 0, total = 0;

  qos_allocator #(.N(N), .NUM_LEVELS(8), .ARB_RR(1'b1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic int level_of(flit_t f);
    header_t h;
    h = header_t'(f.data);
    if (is_circuit_code(h.qos)) return 7;
    return h.qos[3] ? 0 : int'(h.qos[2:0]);
  endfunction

  task automatic add_packet(int i, logic [3:0] qos, int len, int seq);
    flit_t f;
    for (int k = 0; k < len; k++) begin
      f.head = (k == 0);
      f.tail = (k == len - 1);
      f.data = (k == 0) ? 32'(make_header(qos, 5'(i), 5'(i), CMD_WR_REQ, 1'b0)) | 32'(seq & 16'h7fff)
                        : {4'hf, 3'(i), 25'(seq * 4 + k)};
      q[i].push_back(f);
      total++;
    end
  endtask

  task automatic drive();
    for (int i = 0; i < N; i++) begin
      ctrl_in[i] = q[i].size() > 0;
      flit_in[i] = (q[i].size() > 0) ? q[i][0] : '0;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq = 0;
    out_ready = 0;
    for (int i = 0; i < N; i++) begin
      for (int p = 0; p < 40; p++) begin
        if ((i == 0 || i == 3) && p == 10) add_packet(i, ENC_QOS_OPEN_CHANNEL, 1, seq++);
        else if ((i == 0 || i == 3) && p == 16) add_packet(i, ENC_QOS_CLOSE_CHANNEL, 1, seq++);
        else add_packet(i, 4'($urandom_range(0, 7)), $urandom_range(1, 3), seq++);
      end
    end
    model_owner = -1;
    model_ch = -1;
    drive();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (n_flits < total) begin
      out_ready = ($urandom_range(0, 4) != 0);
      #1;
      // work conservation and circuit blocking
      if (model_owner < 0 && model_ch < 0 && ctrl_in != 0) check(out_valid, "free output idle while a head waits");
      if (model_ch >= 0 && ctrl_in != 0 && ctrl_in != (1 << model_ch)) n_block++;
      if (out_valid && !out_ready) n_stall++;
      check($countones(ctrl_out) == (out_valid && out_ready ? 1 : 0), "one grant per moved flit");
      if (ctrl_out != 0) begin
        int g;
        g = $clog2(ctrl_out);
        check(flit_out == q[g][0], "flit delivered unaltered and in order");
        if (model_owner >= 0) check(g == model_owner, $sformatf("packets interleaved g=%0d owner=%0d ctrl_out=%b head=%b tail=%b", g, model_owner, ctrl_out, flit_out.head, flit_out.tail));
        else begin
          check(flit_out.head, "packet starts with head flit");
          if (model_ch >= 0) check(g == model_ch, "circuit owner only");
          else begin
            for (int j = 0; j < N; j++)
              if (j != g && ctrl_in[j]) begin
                check(level_of(q[j][0]) <= level_of(flit_out), "lower level won");
              end
          end
          for (int j = 0; j < N; j++)
            if (j != g && ctrl_in[j] && level_of(q[j][0]) < level_of(flit_out) && j < g) n_overtake++;
          begin
            header_t h;
            h = header_t'(flit_out.data);
            if (h.qos == ENC_QOS_OPEN_CHANNEL) begin model_ch = g; n_circuit++; end
            if (h.qos == ENC_QOS_CLOSE_CHANNEL) model_ch = -1;
          end
        end
        model_owner = flit_out.tail ? -1 : g;
        @(posedge clk);
        #1;
        void'(q[g].pop_front());
        drive();
        n_flits++;
      end else @(posedge clk);
      @(negedge clk);
      check(qos_channel == ((model_ch >= 0) ? N'(1 << model_ch) : '0), "channel flip-flops follow open/close");
    end
    check(n_overtake > 0, "priority overtake happened");
    check(n_circuit == 2, "two circuits opened");
    check(n_block > 0, "a circuit blocked other flows");
    check(n_stall > 0, "downstream stall happened");
    $display("overtakes=%0d circuits=%0d blocked=%0d stalls=%0d flits=%0d", n_overtake, n_circuit, n_block, n_stall, n_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
