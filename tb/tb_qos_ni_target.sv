// tb_qos_ni_target: self-checking test of the target NI.
//
// The testbench plays the network and a memory (read data one cycle after
// the read). It sends random write and read request packets with random
// QoS levels and checks the memory accesses, the response packets
// (destination = requester, QoS = request's level, command, read data),
// the echo of a full-duplex OPEN/CLOSE and the silent absorption of a
// one-way one. The network side stalls at random.
module tb_qos_ni_target;
  import qos_noc_pkg::*;
  localparam logic [4:0] ME = 5'd14;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  flit_t rx_flit = '0, tx_flit;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  logic [31:0] mem [2**AW];
  logic [31:0] model [int];
  flit_t got [$];

  qos_ni_target #(.MY_ID(ME), .MEM_AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  always @(posedge clk) begin
    if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_en && !mem_we) mem_rdata <= mem[mem_addr];
    if (tx_valid && tx_ready) got.push_back(tx_flit);
    tx_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic put(bit head, bit tail, logic [31:0] d);
    rx_valid <= 1; rx_flit <= '{head: head, tail: tail, data: d};
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    rx_valid <= 0;
  endtask

  task automatic wait_flits(int n);
    int t = 0;
    while (got.size() < n && t < 100) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk);
    check(got.size() == n, $sformatf("expected %0d response flits, got %0d", n, got.size()));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    header_t h;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [4:0] src;
      logic [3:0] q;
      int a;
      bit w;
      src = 5'($urandom);
      q   = 4'($urandom_range(0, 7));
      w   = (n < 20) || ($urandom_range(0, 1) == 1);
      a   = (n < 20 || model.size() == 0) ? $urandom_range(0, 2**AW - 1) : $urandom_range(0, 19) * 37 % (2**AW);
      got.delete();
      put(1, 0, make_header(q, ME, src, w ? CMD_WR_REQ : CMD_RD_REQ, 0));
      if (w) begin
        logic [31:0] d;
        d = $urandom;
        put(0, 0, {20'h0, 10'(a), 2'b00});
        put(0, 1, d);
        model[a] = d;
        wait_flits(1);
        h = header_t'(got[0].data);
        check(got[0].head && got[0].tail && h.cmd == CMD_WR_RESP, "write acknowledge");
        check(mem[a] == d, "memory written");
      end else begin
        put(0, 1, {20'h0, 10'(a), 2'b00});
        wait_flits(2);
        h = header_t'(got[0].data);
        check(got[0].head && !got[0].tail && h.cmd == CMD_RD_RESP, "read response header");
        check(got[1].tail && got[1].data == mem[a], "read data");
        if (model.exists(a)) check(got[1].data == model[a], "read data matches earlier write");
      end
      check(h.dst == src && h.src == ME && h.qos == q, "response routed back with the request's level");
    end
    // full-duplex open is echoed, one-way close is absorbed
    got.delete();
    put(1, 1, make_header(ENC_QOS_OPEN_CHANNEL, ME, 5'd3, CMD_WR_REQ, 1));
    wait_flits(1);
    h = header_t'(got[0].data);
    check(h.qos == ENC_QOS_OPEN_CHANNEL && h.dst == 5'd3 && h.src == ME && got[0].head && got[0].tail, "OPEN echoed");
    got.delete();
    put(1, 1, make_header(ENC_QOS_CLOSE_CHANNEL, ME, 5'd3, CMD_WR_REQ, 0));
    wait_flits(0);
    got.delete();
    put(1, 1, make_header(ENC_QOS_CLOSE_CHANNEL, ME, 5'd3, CMD_WR_REQ, 1));
    wait_flits(1);
    h = header_t'(got[0].data);
    check(h.qos == ENC_QOS_CLOSE_CHANNEL && h.dst == 5'd3, "CLOSE echoed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
