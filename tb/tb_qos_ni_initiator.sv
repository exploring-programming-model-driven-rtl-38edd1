// tb_qos_ni_initiator: self-checking test of the initiator NI.
//
// The testbench plays the processor (an AHB master) and the network. It
// programs priority registers and reads them back, including two writes
// whose AHB phases overlap. It then issues writes and reads to several
// endpoints and checks every injected packet (QoS field = programmed level,
// destination, source, command, address and data flits, head/tail flags)
// and that the AHB data phase is held (hreadyout low) until the response
// arrives. It opens a full-duplex circuit (must wait for the echo) and
// closes a one-way circuit (must not wait). The network side stalls
// tx_ready at random.
module tb_qos_ni_initiator;
  import qos_noc_pkg::*;
  localparam logic [4:0] ME = 5'd2;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0, hready, hreadyout, hresp;
  logic [1:0] htrans = 2'b00;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  assign hready = hreadyout;
  logic tx_valid, tx_ready = 0, rx_valid = 0, rx_ready;
  flit_t tx_flit, rx_flit = '0;
  int checks = 0, failures = 0;
  flit_t got [$];

  qos_ni_initiator #(.MY_ID(ME)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // network sink with random back-pressure
  always @(posedge clk) begin
    if (tx_valid && tx_ready) got.push_back(tx_flit);
    tx_ready <= ($urandom_range(0, 2) != 0);
  end

  // AHB single transfer from the processor
  task automatic cpu(input bit we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] rd);
    @(posedge clk);
    #1;
    check(hreadyout, "NI ready between transfers");
    hsel = 1; htrans = 2'b10; haddr = a; hwrite = we;
    @(posedge clk);
    #1;
    hsel = 0; htrans = 2'b00; hwdata = d;
    while (!hreadyout) begin
      @(posedge clk);
      #1;
    end
    check(hresp == 1'b0, "OKAY response");
    rd = hrdata;
  endtask

  // wait for n flits from the NI
  task automatic wait_flits(int n);
    int t = 0;
    while (got.size() < n && t < 200) begin @(posedge clk); t++; end
    check(got.size() == n, $sformatf("expected %0d flits, got %0d", n, got.size()));
  endtask

  task automatic reply(flit_t f);
    rx_valid <= 1; rx_flit <= f;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    rx_valid <= 0;
  endtask

  function automatic flit_t hflit(header_t h, bit tail);
    flit_t f;
    f.head = 1; f.tail = tail; f.data = h;
    return f;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    header_t h;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // program levels: endpoint 7 -> 5, endpoint 20 -> 7; read back
    cpu(1, 32'h8000_0000 + 7 * 4, 32'd5, rd);
    cpu(1, 32'h8000_0000 + 20 * 4, 32'd7, rd);
    cpu(0, 32'h8000_0000 + 7 * 4, 0, rd);
    check(rd == 5, "priority register read back");
    cpu(0, 32'h8000_0000 + 9 * 4, 0, rd);
    check(rd == 0, "unprogrammed register reads level 0");
    check(got.size() == 0, "register accesses inject nothing");
    // two register writes back to back: the second address phase overlaps
    // the last cycle of the first data phase
    @(posedge clk);
    #1;
    hsel = 1; htrans = 2'b10; haddr = 32'h8000_0000 + 3 * 4; hwrite = 1;
    @(posedge clk);
    #1;
    hsel = 0; htrans = 2'b00; hwdata = 32'd2;
    while (!hreadyout) begin @(posedge clk); #1; end
    hsel = 1; htrans = 2'b10; haddr = 32'h8000_0000 + 4 * 4; hwrite = 1;
    @(posedge clk);
    #1;
    hsel = 0; htrans = 2'b00; hwdata = 32'd6;
    while (!hreadyout) begin @(posedge clk); #1; end
    cpu(0, 32'h8000_0000 + 3 * 4, 0, rd);
    check(rd == 2, "first pipelined write");
    cpu(0, 32'h8000_0000 + 4 * 4, 0, rd);
    check(rd == 6, "second pipelined write");

    // prioritised write to endpoint 7
    for (int n = 0; n < 6; n++) begin
      logic [4:0] ep;
      logic [31:0] a, d;
      int lvl;
      bit w;
      ep  = (n % 3 == 0) ? 5'd7 : (n % 3 == 1) ? 5'd20 : 5'd9;
      lvl = (ep == 7) ? 5 : (ep == 20) ? 7 : 0;
      w   = (n < 3);
      a   = {3'b000, ep, 24'($urandom) & 24'hfffffc};
      d   = $urandom;
      got.delete();
      fork
        cpu(w, a, d, rd);
        begin
          wait_flits(w ? 3 : 2);
          h = header_t'(got[0].data);
          check(got[0].head && !got[0].tail, "header flit flags");
          check(h.qos == 4'(lvl), $sformatf("QoS field %0d, expected %0d", h.qos, lvl));
          check(h.dst == ep && h.src == ME, "destination and source");
          check(h.cmd == (w ? CMD_WR_REQ : CMD_RD_REQ), "command");
          check(got[1].data == a && !got[1].head && got[1].tail == !w, "address flit");
          if (w) check(got[2].data == d && got[2].tail, "data flit");
          repeat (5) @(posedge clk);
          check(!hreadyout, "data phase stretched until the response");
          if (w) reply(hflit(make_header(4'(lvl), ME, ep, CMD_WR_RESP, 0), 1));
          else begin
            flit_t f;
            reply(hflit(make_header(4'(lvl), ME, ep, CMD_RD_RESP, 0), 0));
            f.head = 0; f.tail = 1; f.data = d ^ 32'h5a5a_0000;
            reply(f);
          end
        end
      join
      if (!w) check(rd == (d ^ 32'h5a5a_0000), "read data returned");
    end

    // open a full-duplex circuit to endpoint 20
    got.delete();
    fork
      cpu(1, 32'h8000_0080, (1 << 9) | (1 << 8) | 20, rd);
      begin
        wait_flits(1);
        h = header_t'(got[0].data);
        check(got[0].head && got[0].tail, "circuit packet is a single flit");
        check(h.qos == ENC_QOS_OPEN_CHANNEL && h.full_duplex && h.dst == 5'd20, "OPEN packet fields");
        repeat (4) @(posedge clk);
        check(!hreadyout, "full-duplex open waits for the echo");
        reply(hflit(make_header(ENC_QOS_OPEN_CHANNEL, ME, 5'd20, CMD_WR_RESP, 0), 1));
      end
    join
    cpu(0, 32'h8000_0080, 0, rd);
    check(rd == ((1 << 9) | (1 << 8) | 20), "channel register read back");

    // close a one-way circuit to endpoint 7: completes without echo
    got.delete();
    cpu(1, 32'h8000_0080, 7, rd);
    wait_flits(1);
    h = header_t'(got[0].data);
    check(h.qos == ENC_QOS_CLOSE_CHANNEL && !h.full_duplex && h.dst == 5'd7, "CLOSE packet fields");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
