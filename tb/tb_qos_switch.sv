// tb_qos_switch: self-checking test of the six-port QoS switch placed at
// column 1, row 1 of the mesh.
//
// Phase 1 (priority): output L0 is held stalled while a level-1 packet
// enters at N and a level-6 packet enters at E, both for L0; when the stall
// is released the level-6 packet must come out first.
// Phase 2 (circuit): W opens a circuit towards L0; a packet from N for L0
// must not leave before W's CLOSE packet, while W's own traffic passes.
// Phase 3 (random): random packets from all six inputs to random
// endpoints with random output stalls. Every packet must leave on the port
// that XY routing gives (worked out here independently), unaltered, with
// its flits contiguous and in order per input/output pair.
// The uncontended hop latency (one cycle from input to output) is checked.
module tb_qos_switch;
  import qos_noc_pkg::*;
  localparam int NP = 6;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit [NP];
  flit_t out_flit [NP];
  int checks = 0, failures = 0;

  flit_t inq [NP][$];
  flit_t pkt_flits [int][$];   // packet id -> flits still expected
  int    pkt_port  [int];      // packet id -> expected output
  int    cur_id    [NP];       // packet currently leaving each output
  int    arrivals  [$];        // packet ids in order of head arrival
  int    next_id = 1, delivered = 0, sent = 0;
  logic [NP-1:0] force_stall = '0;
  int    n_stall = 0;

  qos_switch #(.SW_X(1), .SW_Y(1), .NUM_LEVELS(8), .FIFO_DEPTH(4), .ARB_RR(1'b1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic int exp_port(logic [4:0] dst);
    int col, row;
    col = int'(dst[4:1]) / 4;
    row = int'(dst[4:1]) % 4;
    if (col > 1) return 1;
    if (col < 1) return 3;
    if (row > 1) return 2;
    if (row < 1) return 0;
    return dst[0] ? 5 : 4;
  endfunction

  function automatic int send(int port, logic [3:0] qos, logic [4:0] dst, int len);
    int id;
    flit_t f;
    id = next_id++;
    for (int k = 0; k < len; k++) begin
      f.head = (k == 0);
      f.tail = (k == len - 1);
      f.data = (k == 0) ? (32'(make_header(qos, dst, 5'(port), CMD_WR_REQ, 1'b0)) | 32'(id)) : {8'hAA, 8'(k), 16'(id)};
      inq[port].push_back(f);
      pkt_flits[id].push_back(f);
    end
    pkt_port[id] = exp_port(dst);
    sent++;
    return id;
  endfunction

  task automatic drive();
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = inq[i].size() > 0;
      in_flit[i]  = in_valid[i] ? inq[i][0] : '0;
    end
  endtask

  // input drivers and output monitors, evaluated one step after each edge
  always @(posedge clk) begin
    logic [NP-1:0] iv, ir, ov, orr;
    flit_t of [NP];
    iv = in_valid; ir = in_ready; ov = out_valid; orr = out_ready; of = out_flit;
    #1;
    if (rst_n) begin
      for (int i = 0; i < NP; i++) if (iv[i] && ir[i]) void'(inq[i].pop_front());
      for (int o = 0; o < NP; o++) begin
        if (ov[o] && !orr[o]) n_stall++;
        if (ov[o] && orr[o]) begin
          int id;
          id = of[o].head ? int'(of[o].data[14:0]) : int'(of[o].data[15:0]);
          if (of[o].head) begin
            check(cur_id[o] == 0, "head inside another packet");
            cur_id[o] = id;
            arrivals.push_back(id);
          end
          check(id == cur_id[o], "flit of a different packet interleaved");
          check(pkt_flits.exists(id) && pkt_flits[id].size() > 0, "unknown flit");
          if (pkt_flits.exists(id) && pkt_flits[id].size() > 0) begin
            check(of[o] == pkt_flits[id][0], "flit altered or out of order");
            check(pkt_port[id] == o, $sformatf("packet %0d left on port %0d, expected %0d", id, o, pkt_port[id]));
            void'(pkt_flits[id].pop_front());
            if (pkt_flits[id].size() == 0) delivered++;
          end
          if (of[o].tail) cur_id[o] = 0;
        end
      end
    end
    drive();
    for (int o = 0; o < NP; o++) out_ready[o] = !force_stall[o] && ($urandom_range(0, 3) != 0 || !rnd_stall);
  end
  bit rnd_stall = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, hi, blk, cl, own;
    // endpoints: switch 5 (col 1, row 1) is local; 5'd10 = {5,0} -> L0
    for (int o = 0; o < NP; o++) cur_id[o] = 0;
    drive();
    out_ready = '1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // latency: a single-flit packet from S to L1 leaves one cycle after entering
    begin
      int t0, id;
      id = send(2, 4'd0, 5'd11, 1);
      @(posedge clk);       // accepted into the buffer at this edge
      #2 check(delivered == 0, "not out in the cycle it is written");
      @(posedge clk);       // leaves at the next edge
      #2 check(delivered == 1, "uncontended hop latency is one cycle");
    end

    // phase 1: priority
    force_stall[4] = 1'b1;
    lo = send(0, 4'd1, 5'd10, 2);
    repeat (3) @(posedge clk);
    hi = send(1, 4'd6, 5'd10, 2);
    repeat (4) @(posedge clk);
    arrivals.delete();
    force_stall[4] = 1'b0;
    repeat (10) @(posedge clk);
    check(arrivals.size() == 2 && arrivals[0] == hi && arrivals[1] == lo, "higher level overtakes at the output");

    // phase 2: circuit from W to L0
    arrivals.delete();
    own = send(3, ENC_QOS_OPEN_CHANNEL, 5'd10, 1);
    repeat (4) @(posedge clk);
    blk = send(0, 4'd7, 5'd10, 2);
    repeat (6) @(posedge clk);
    check(dut.g_out[4].u_alloc.qos_channel == 6'b001000, "circuit bit set for input W");
    void'(send(3, 4'd0, 5'd10, 3));
    repeat (8) @(posedge clk);
    check(pkt_flits[blk].size() == 2, "flow from N blocked by the circuit");
    cl = send(3, ENC_QOS_CLOSE_CHANNEL, 5'd10, 1);
    repeat (8) @(posedge clk);
    check(pkt_flits[blk].size() == 0, "blocked flow released after close");
    check(arrivals.size() == 4 && arrivals[2] == cl && arrivals[3] == blk, "blocked packet leaves after the close packet");
    check(dut.g_out[4].u_alloc.qos_channel == 6'b000000, "circuit bit cleared");

    // phase 3: random traffic
    rnd_stall = 1;
    for (int n = 0; n < 600; n++) begin
      int p;
      p = $urandom_range(0, NP - 1);
      if (inq[p].size() < 8) void'(send(p, 4'($urandom_range(0, 7)), 5'($urandom_range(0, 31)), $urandom_range(1, 4)));
      @(posedge clk);
    end
    rnd_stall = 0;
    while (delivered < sent) @(posedge clk);
    check(n_stall > 0, "output stalls happened");
    $display("sent=%0d delivered=%0d stalls=%0d", sent, delivered, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
