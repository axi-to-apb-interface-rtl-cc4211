// tb_axi_master: self-checking test of the command-driven AXI4-Lite master.
//
// The testbench is the user and an AXI4-Lite slave. The slave model delays
// AWREADY, WREADY, ARREADY, BVALID and RVALID at random, stores written
// words and answers SLVERR for addresses with bit 20 set. Checks: the AXI
// address, data, strobes and protection of every beat, burst addresses
// stepping by four bytes for BURST_LEN beats, one beat_done per beat,
// data_out per read beat, wr_done/rd_done once per command, busy, and
// resp_err after an erroring beat.
module tb_axi_master;
  import axi_apb_pkg::*;
  localparam int unsigned AW = 32, DW = 32, BL = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] data_in = '0, data_out;
  logic wr_en = 0, rd_en = 0, wr_burst = 0, rd_burst = 0;
  logic busy, beat_done, wr_done, rd_done, resp_err;
  logic awvalid, awready = 0, wvalid, wready = 0, bvalid = 0, bready;
  logic arvalid, arready = 0, rvalid = 0, rready;
  logic [AW-1:0] awaddr, araddr;
  logic [2:0] awprot, arprot;
  logic [DW-1:0] wdata, rdata = '0;
  logic [3:0] wstrb;
  logic [1:0] bresp = '0, rresp = '0;

  axi_master #(.BURST_LEN(BL)) dut (
    .clk, .rst_n, .wr_addr, .rd_addr, .data_in, .wr_en, .rd_en, .wr_burst, .rd_burst,
    .busy, .beat_done, .wr_done, .rd_done, .data_out, .resp_err,
    .AWVALID(awvalid), .AWREADY(awready), .AWADDR(awaddr), .AWPROT(awprot),
    .WVALID(wvalid), .WREADY(wready), .WDATA(wdata), .WSTRB(wstrb),
    .BVALID(bvalid), .BREADY(bready), .BRESP(bresp),
    .ARVALID(arvalid), .ARREADY(arready), .ARADDR(araddr), .ARPROT(arprot),
    .RVALID(rvalid), .RREADY(rready), .RDATA(rdata), .RRESP(rresp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite slave model ----------------
  logic [DW-1:0] smem [logic [AW-1:0]];
  logic [AW-1:0] beat_addrs [$];   // addresses seen, in order
  logic [DW-1:0] beat_wdata [$];

  function automatic logic [1:0] resp_for(input logic [AW-1:0] a);
    return a[20] ? RESP_SLVERR : RESP_OKAY;
  endfunction

  // Write side: take AW and W (each with random delay), then answer B.
  initial begin
    forever begin
      automatic logic [AW-1:0] a;
      automatic logic [DW-1:0] d;
      automatic bit got_aw = 0, got_w = 0;
      @(negedge clk);
      while (!(got_aw && got_w)) begin
        awready = !got_aw && awvalid && ($urandom_range(2) == 0);
        wready  = !got_w && wvalid && ($urandom_range(2) == 0);
        @(posedge clk);
        if (awvalid && awready) begin
          got_aw = 1; a = awaddr;
          check(awprot == 3'b000, "AWPROT");
        end
        if (wvalid && wready) begin
          got_w = 1; d = wdata;
          check(wstrb == 4'hF, "WSTRB all lanes");
        end
        @(negedge clk);
      end
      awready = 0; wready = 0;
      beat_addrs.push_back(a);
      beat_wdata.push_back(d);
      if (!a[20]) smem[a] = d;
      repeat ($urandom_range(3)) @(negedge clk);
      bvalid = 1; bresp = resp_for(a);
      @(posedge clk);
      while (!bready) @(posedge clk);
      #1 bvalid = 0;
    end
  end

  // Read side.
  initial begin
    forever begin
      automatic logic [AW-1:0] a;
      @(negedge clk);
      arready = arvalid && ($urandom_range(2) == 0);
      @(posedge clk);
      if (arvalid && arready) begin
        a = araddr;
        check(arprot == 3'b000, "ARPROT");
        #1 arready = 0;
        beat_addrs.push_back(a);
        repeat ($urandom_range(3)) @(negedge clk);
        rvalid = 1; rresp = resp_for(a);
        rdata = smem.exists(a) ? smem[a] : 32'hDEAD_BEEF;
        @(posedge clk);
        while (!rready) @(posedge clk);
        #1 rvalid = 0;
      end
    end
  end

  // ---------------- user side ----------------
  int beats = 0, wdone = 0, rdone = 0;
  always @(posedge clk) begin
    if (beat_done) beats++;
    if (wr_done) wdone++;
    if (rd_done) rdone++;
  end

  // Issue a command and, for writes, feed one data word per beat.
  task automatic command(input bit w, input bit burst, input logic [AW-1:0] a,
                         input logic [DW-1:0] d[], output logic [DW-1:0] rd[], output bit err);
    int n = burst ? BL : 1;
    int b0 = beats, wd0 = wdone, rd0 = rdone;
    rd = new[n];
    @(negedge clk);
    check(!busy, "idle before command");
    if (w) begin wr_en = 1; wr_burst = burst; wr_addr = a; data_in = d[0]; end
    else   begin rd_en = 1; rd_burst = burst; rd_addr = a; end
    @(negedge clk);
    wr_en = 0; rd_en = 0; wr_burst = 0; rd_burst = 0;
    check(busy, "busy after command");
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      while (!beat_done) @(posedge clk);
      rd[i] = data_out;
      if (w && i + 1 < n) begin #1 data_in = d[i + 1]; end
    end
    @(posedge clk);
    while (!(wr_done || rd_done)) @(posedge clk);
    err = resp_err;
    #1;
    check(beats - b0 == n, $sformatf("%0d beat_done pulses expected %0d", beats - b0, n));
    check((w ? wdone - wd0 : rdone - rd0) == 1 && (w ? rdone - rd0 : wdone - wd0) == 0,
          "one matching done pulse");
  endtask

  logic [DW-1:0] ref_mem [logic [AW-1:0]];

  initial begin
    logic [DW-1:0] d[], rd[];
    bit err;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      automatic bit w = ($urandom_range(1) == 1) || n < 5;
      automatic bit burst = $urandom_range(1);
      automatic logic [AW-1:0] a = {12'h0, 1'b0, 5'($urandom_range(3)), 12'($urandom_range(255)), 2'b00};
      automatic int nb = burst ? BL : 1;
      automatic bit exp_err;
      if ($urandom_range(7) == 0) a[20] = 1'b1;
      exp_err = a[20];
      d = new[nb];
      foreach (d[i]) d[i] = $urandom;
      beat_addrs.delete();
      beat_wdata.delete();
      command(w, burst, a, d, rd, err);
      check(beat_addrs.size() == nb, "one AXI transaction per beat");
      for (int i = 0; i < nb && i < beat_addrs.size(); i++) begin
        automatic logic [AW-1:0] ea = a + AW'(4 * i);
        check(beat_addrs[i] == ea, $sformatf("beat %0d address %h expected %h", i, beat_addrs[i], ea));
        if (w) begin
          check(beat_wdata[i] == d[i], $sformatf("beat %0d data %h expected %h", i, beat_wdata[i], d[i]));
          if (!exp_err) ref_mem[ea] = d[i];
        end else begin
          automatic logic [DW-1:0] e = ref_mem.exists(ea) ? ref_mem[ea] : 32'hDEAD_BEEF;
          if (!exp_err) check(rd[i] == e, $sformatf("read beat %0d %h expected %h", i, rd[i], e));
        end
      end
      check(err == exp_err, "resp_err");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
