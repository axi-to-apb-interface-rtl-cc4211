// tb_burst_example: the reference burst scenario run on the full system at
// its default parameters.
//
// A four-beat burst write puts the words 85, 243, 14 and 213 at word
// addresses 14, 15, 16 and 17 of APB slave 0 (byte addresses 0x38 to
// 0x44), then a four-beat burst read fetches them back. The test checks
// every APB transfer on the internal bus (slave, address, direction, data),
// the words left in the slave's memory, the read data on DATA_OUT beat by
// beat, the done pulses and the cycle counts of both bursts.
module tb_burst_example;
  localparam int unsigned AW = 32, DW = 32;

  logic CLK = 1'b0, RST = 1'b1;
  logic [AW-1:0] WR_ADDR = '0, RD_ADDR = '0;
  logic [DW-1:0] DATA_IN = '0, DATA_OUT;
  logic WR_EN = 0, RD_EN = 0, WR_BURST = 0, RD_BURST = 0;
  logic BUSY, BEAT_DONE, WR_DONE, RD_DONE, RESP_ERR;

  bus_bridge_top dut (.*);

  always #5 CLK = ~CLK;
  int cycle = 0;
  always @(posedge CLK) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge CLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [DW-1:0] WORDS [4] = '{32'd85, 32'd243, 32'd14, 32'd213};

  // APB transfers seen on the internal bus.
  logic [AW-1:0] apb_addr [$];
  logic [DW-1:0] apb_data [$];
  logic          apb_wr   [$];
  always @(posedge CLK) begin
    if (!RST && dut.psel[0] && dut.penable && dut.pready[0]) begin
      apb_addr.push_back(dut.paddr);
      apb_wr.push_back(dut.pwrite);
      apb_data.push_back(dut.pwrite ? dut.pwdata : dut.prdata[0]);
    end
    if (!RST && dut.penable) check(dut.psel == 16'h0001, "only slave 0 selected");
  end

  initial begin
    int c0;
    repeat (3) @(posedge CLK);
    #1 RST = 0;

    // Burst write.
    @(negedge CLK);
    WR_EN = 1; WR_BURST = 1; WR_ADDR = 32'd14 * 4; DATA_IN = WORDS[0];
    c0 = cycle;
    @(negedge CLK);
    WR_EN = 0; WR_BURST = 0;
    for (int i = 1; i < 4; i++) begin
      @(posedge CLK);
      while (!BEAT_DONE) @(posedge CLK);
      #1 DATA_IN = WORDS[i];
    end
    @(posedge CLK);
    while (!WR_DONE) @(posedge CLK);
    check(cycle - c0 == 36, $sformatf("burst write cycles %0d", cycle - c0));
    check(!RESP_ERR, "burst write without error");
    for (int i = 0; i < 4; i++)
      check(dut.g_slave[0].u_mem.mem[14 + i] == WORDS[i],
            $sformatf("memory word %0d holds %0d", 14 + i, dut.g_slave[0].u_mem.mem[14 + i]));

    // Burst read.
    @(negedge CLK);
    RD_EN = 1; RD_BURST = 1; RD_ADDR = 32'd14 * 4;
    c0 = cycle;
    @(negedge CLK);
    RD_EN = 0; RD_BURST = 0;
    for (int i = 0; i < 4; i++) begin
      @(posedge CLK);
      while (!BEAT_DONE) @(posedge CLK);
      check(DATA_OUT == WORDS[i], $sformatf("read beat %0d got %0d", i, DATA_OUT));
    end
    @(posedge CLK);
    while (!RD_DONE) @(posedge CLK);
    check(cycle - c0 == 30, $sformatf("burst read cycles %0d", cycle - c0));
    check(!RESP_ERR, "burst read without error");

    // The APB saw eight single transfers: four writes then four reads.
    check(apb_addr.size() == 8, $sformatf("%0d APB transfers", apb_addr.size()));
    for (int i = 0; i < 8 && i < apb_addr.size(); i++) begin
      check(apb_addr[i] == AW'((14 + i % 4) * 4), $sformatf("APB address %0d", i));
      check(apb_wr[i] == (i < 4), $sformatf("APB direction %0d", i));
      check(apb_data[i] == WORDS[i % 4], $sformatf("APB data %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
