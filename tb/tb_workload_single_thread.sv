// tb_workload_single_thread: the single-thread interference and the
// guaranteed-service workloads run on the full platform at its defaults.
//
//  1. ARM0-3 form a team; each thread works only on its own shared bank
//     SM0-SM3. ARM4-7 and the DMA engine (driven here on its device link)
//     all load SM3, so the thread on ARM3 is the one delayed. Run once with
//     no priorities and once with level 7 programmed for each team thread's
//     own bank; ARM3, and so the team, must finish sooner with priorities.
//  2. ARM0 opens a full-duplex guaranteed channel to Video1 and streams
//     writes while ARM1, whose packets cross the same link, is held until
//     the channel is closed.
// The sizes (30 transfers per source) are scaled down from the document's
// benchmark, whose data sizes are not given.
module tb_workload_single_thread;
  import qos_noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]  ahb_hsel = '0, ahb_hwrite = '0, ahb_hready, ahb_hreadyout, ahb_hresp;
  logic [31:0] ahb_haddr [8], ahb_hwdata [8], ahb_hrdata [8];
  logic [1:0]  ahb_htrans [8];
  assign ahb_hready = ahb_hreadyout;   // each NI is the only slave on its processor's bus
  logic [7:0]  dev_in_valid = '0, dev_in_ready, dev_out_valid, dev_out_ready;
  flit_t       dev_in_flit [8], dev_out_flit [8];
  int checks = 0, failures = 0;
  int n_overtake = 0, n_block = 0, n_stall = 0, n_open = 0, n_close = 0;
  longint cycle = 0;

  qos_mpsoc_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // endpoint numbers of the platform
  function automatic int sw_of_arm(int k); return (k / 2) * 4 + 1 + (k % 2); endfunction
  function automatic int ep_pm(int k);     return 2 * sw_of_arm(k) + 1; endfunction
  function automatic int ep_sm(int j);     return 2 * ((j / 2) * 4 + (j % 2) * 3); endfunction
  localparam int EP_VIDEO1 = 1;

  // ---------------- monitors in every allocator ----------------
  logic [5:0] chan_open [16];
  for (genvar s = 0; s < 16; s++) begin : g_mon_sw
    for (genvar o = 0; o < 6; o++) begin : g_mon_out
      assign chan_open[s][o] = dut.g_sw[s].u_sw.g_out[o].u_alloc.qos_channel != 0;
      always @(posedge clk) if (rst_n) begin
        logic [5:0] hr, ch;
        hr = dut.g_sw[s].u_sw.g_out[o].u_alloc.head_req;
        ch = dut.g_sw[s].u_sw.g_out[o].u_alloc.qos_channel;
        if (dut.g_sw[s].u_sw.g_out[o].u_alloc.fire && !dut.g_sw[s].u_sw.g_out[o].u_alloc.locked && ch == 0) begin
          for (int i = 0; i < 6; i++)
            for (int j = 0; j < 6; j++)
              if (dut.g_sw[s].u_sw.g_out[o].u_alloc.sel[i] && hr[j] && j != i &&
                  dut.g_sw[s].u_sw.g_out[o].u_alloc.qos_priority[j] < dut.g_sw[s].u_sw.g_out[o].u_alloc.qos_priority[i])
                n_overtake++;
        end
        if (ch != 0 && (hr & ~ch) != 0) n_block++;
        if (dut.g_sw[s].u_sw.out_valid[o] && !dut.g_sw[s].u_sw.out_ready[o]) n_stall++;
      end
    end
  end

  // ---------------- device links ----------------
  // Video1 (device 0) answers like a memory-mapped device; others sink.
  flit_t vq [$];
  header_t vh;
  bit v_in_pkt = 0;
  int video_writes = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      dev_out_ready <= '1;
    end else begin
      if (dev_in_valid[0] && dev_in_ready[0]) void'(vq.pop_front());
      if (dev_out_valid[0] && dev_out_ready[0]) begin
        flit_t f;
        f = dev_out_flit[0];
        if (f.head) begin
          vh = header_t'(f.data);
          if (vh.qos == ENC_QOS_OPEN_CHANNEL) n_open++;
          if (vh.qos == ENC_QOS_CLOSE_CHANNEL) n_close++;
          if (is_circuit_code(vh.qos) && vh.full_duplex)
            vq.push_back('{head: 1'b1, tail: 1'b1, data: make_header(vh.qos, vh.src, 5'(EP_VIDEO1), CMD_WR_RESP, 1'b0)});
        end
        if (f.tail && !is_circuit_code(vh.qos)) begin
          if (vh.cmd == CMD_WR_REQ) begin
            video_writes++;
            vq.push_back('{head: 1'b1, tail: 1'b1, data: make_header(vh.qos, vh.src, 5'(EP_VIDEO1), CMD_WR_RESP, 1'b0)});
          end else begin
            vq.push_back('{head: 1'b1, tail: 1'b0, data: make_header(vh.qos, vh.src, 5'(EP_VIDEO1), CMD_RD_RESP, 1'b0)});
            vq.push_back('{head: 1'b0, tail: 1'b1, data: 32'hF00D_0001});
          end
        end
      end
      dev_out_ready <= '1;
      dev_out_ready[0] <= ($urandom_range(0, 3) != 0);
    end
    #1;
    dev_in_valid[0] = vq.size() > 0;
    dev_in_flit[0]  = (vq.size() > 0) ? vq[0] : '0;
  end
  initial for (int j = 1; j < 8; j++) if (j != 5) dev_in_flit[j] = '0;

  // ---------------- processor model ----------------
  // One AHB single transfer. Signals are written with blocking assignments
  // one step after an edge, so the eight processor threads never race the
  // design or each other.
  task automatic xfer(int k, bit we, logic [31:0] a, logic [31:0] d, output logic [31:0] rd);
    @(posedge clk);
    #1;
    ahb_hsel[k] = 1'b1; ahb_htrans[k] = 2'b10; ahb_haddr[k] = a; ahb_hwrite[k] = we;
    @(posedge clk);      // address phase taken (the NI is ready between transfers)
    #1;
    ahb_hsel[k] = 1'b0; ahb_htrans[k] = 2'b00; ahb_hwdata[k] = d;
    while (!ahb_hreadyout[k]) begin
      @(posedge clk);
      #1;
    end
    rd = ahb_hrdata[k];
  endtask

  function automatic logic [31:0] maddr(int ep, int word);
    return {3'b000, 5'(ep), 12'h0, 10'(word), 2'b00};
  endfunction

  task automatic set_priority(int k, int ep, int lvl);
    logic [31:0] rd;
    xfer(k, 1, 32'h8000_0000 + 32'(ep * 4), 32'(lvl), rd);
  endtask

  // write and read back four words of the private bank and of every shared bank
  task automatic integrity(int kk);
    logic [31:0] rd;
    for (int j = -1; j < 8; j++) begin
      int ep;
      ep = (j < 0) ? ep_pm(kk) : ep_sm(j);
      for (int w = 0; w < 4; w++) xfer(kk, 1, maddr(ep, kk * 8 + w), {8'(kk), 8'(j + 1), 16'(w * 77 + 5)}, rd);
      for (int w = 0; w < 4; w++) begin
        xfer(kk, 0, maddr(ep, kk * 8 + w), 0, rd);
        check(rd == {8'(kk), 8'(j + 1), 16'(w * 77 + 5)}, $sformatf("ARM%0d read back from endpoint %0d word %0d: %h", kk, ep, kk * 8 + w, rd));
      end
    end
  endtask

  longint finish_t [8];
  task automatic hammer(int k, int ep, int n);
    logic [31:0] rd;
    for (int i = 0; i < n; i++) begin
      xfer(k, (i % 2) == 0, maddr(ep, 512 + k * 16 + (i % 16)), 32'(k * 1000 + i), rd);
    end
    finish_t[k] = cycle;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired hreadyout=%b", ahb_hreadyout);
    $display("ni %0d %0d %0d %0d %0d %0d %0d %0d", dut.g_arm[0].u_ni.state, dut.g_arm[1].u_ni.state, dut.g_arm[2].u_ni.state, dut.g_arm[3].u_ni.state, dut.g_arm[4].u_ni.state, dut.g_arm[5].u_ni.state, dut.g_arm[6].u_ni.state, dut.g_arm[7].u_ni.state);
    $display("sm %0d %0d %0d %0d %0d %0d %0d %0d", dut.g_sm[0].u_sm_ni.state, dut.g_sm[1].u_sm_ni.state, dut.g_sm[2].u_sm_ni.state, dut.g_sm[3].u_sm_ni.state, dut.g_sm[4].u_sm_ni.state, dut.g_sm[5].u_sm_ni.state, dut.g_sm[6].u_sm_ni.state, dut.g_sm[7].u_sm_ni.state);
    $display("pm %0d %0d %0d %0d %0d %0d %0d %0d", dut.g_arm[0].u_pm_ni.state, dut.g_arm[1].u_pm_ni.state, dut.g_arm[2].u_pm_ni.state, dut.g_arm[3].u_pm_ni.state, dut.g_arm[4].u_pm_ni.state, dut.g_arm[5].u_pm_ni.state, dut.g_arm[6].u_pm_ni.state, dut.g_arm[7].u_pm_ni.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DMA on device link 5: keeps writing single words to SM3 while enabled
  bit dma_on = 0;
  int dma_sent = 0, dma_acks = 0;
  flit_t dq [$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (dev_in_valid[5] && dev_in_ready[5]) void'(dq.pop_front());
      if (dev_out_valid[5] && dev_out_ready[5] && dev_out_flit[5].head) dma_acks++;
      if (dma_on && dq.size() == 0 && dma_sent - dma_acks < 2) begin
        dq.push_back('{head: 1'b1, tail: 1'b0, data: make_header(4'd0, 5'(ep_sm(3)), 5'(2 * 11 + 1), CMD_WR_REQ, 1'b0)});
        dq.push_back('{head: 1'b0, tail: 1'b0, data: maddr(ep_sm(3), 900 + dma_sent % 16)});
        dq.push_back('{head: 1'b0, tail: 1'b1, data: 32'(dma_sent)});
        dma_sent++;
      end
    end
    #1;
    dev_in_valid[5] = dq.size() > 0;
    dev_in_flit[5]  = (dq.size() > 0) ? dq[0] : '0;
  end

  initial begin
    longint t0, team [2], arm3 [2];
    for (int k = 0; k < 8; k++) begin ahb_haddr[k] = '0; ahb_hwdata[k] = '0; ahb_htrans[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // 1. single-thread interference on SM3
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1)
        for (int k = 0; k < 4; k++) set_priority(k, ep_sm(k), 7);
      dma_on = 1;
      t0 = cycle;
      for (int k = 0; k < 8; k++) begin
        automatic int kk = k;
        fork hammer(kk, (kk < 4) ? ep_sm(kk) : ep_sm(3), 30); join_none
      end
      wait fork;
      dma_on = 0;
      team[pass] = 0;
      for (int k = 0; k < 4; k++) if (finish_t[k] - t0 > team[pass]) team[pass] = finish_t[k] - t0;
      arm3[pass] = finish_t[3] - t0;
      $display("pass %0d: team finish %0d cycles; per ARM: %0d %0d %0d %0d | %0d %0d %0d %0d; DMA writes %0d", pass, team[pass],
               finish_t[0] - t0, finish_t[1] - t0, finish_t[2] - t0, finish_t[3] - t0,
               finish_t[4] - t0, finish_t[5] - t0, finish_t[6] - t0, finish_t[7] - t0, dma_sent);
      repeat (50) @(posedge clk);
    end
    check(arm3[1] < arm3[0], "delayed thread ARM3 sped up by priorities");
    check(team[1] < team[0], "team finishes sooner with priorities");
    check(dma_acks == dma_sent && dma_sent > 0, "all DMA writes acknowledged");
    begin
      logic [31:0] rd;
      for (int i = 0; i < 4; i++) begin
        xfer(0, 0, maddr(ep_sm(3), 900 + i), 0, rd);
        check(rd[3:0] == 4'(i) && rd < 32'(dma_sent), "DMA data landed in SM3");
      end
    end

    // 2. guaranteed channel ARM0 -> Video1, ARM1 held meanwhile
    begin
      logic [31:0] rd;
      longint arm1_done;
      arm1_done = 0;
      xfer(0, 1, 32'h8000_0080, (1 << 9) | (1 << 8) | EP_VIDEO1, rd);
      check(n_open == 1, "OPEN reached Video1");
      fork
        begin
          for (int i = 0; i < 10; i++) xfer(0, 1, maddr(EP_VIDEO1, i), 32'(i), rd);
          repeat (20) @(posedge clk);
          check(arm1_done == 0, "ARM1 held while the channel is open");
          xfer(0, 1, 32'h8000_0080, (1 << 8) | EP_VIDEO1, rd);
        end
        begin
          repeat (3) @(posedge clk);
          xfer(1, 1, maddr(EP_VIDEO1, 100), 32'h2222, rd);
          arm1_done = cycle;
        end
      join
      check(n_close == 1 && arm1_done != 0, "ARM1 served after the close");
      check(video_writes == 11, "all Video1 writes arrived");
    end
    check(n_overtake > 0, "priority arbitration happened");
    check(n_block > 0, "channel blocked another flow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
