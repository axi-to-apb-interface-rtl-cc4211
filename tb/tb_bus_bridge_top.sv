// tb_bus_bridge_top: end-to-end test of the whole system at its default
// parameters (32-bit AXI4-Lite and APB, sixteen APB memory slaves of 256
// words, bursts of four).
//
// Through the user command port alone it fills every word of every slave
// with burst writes, reads all of them back with burst reads, then runs a
// random mix of single and burst commands, including addresses in the
// unmapped part of a slave slot (SLVERR from the slave) and above the
// sixteen slots (DECERR from the bridge). A reference model of all memories
// predicts each read and each error flag. It also checks the latency of a
// single write and a single read and of a four-beat burst, and counts how
// often each mechanism happened: single and burst writes and reads, APB
// wait states, slave errors, decode errors and a transfer to each of the
// sixteen slaves. A mechanism that never happened counts as a failure.
module tb_bus_bridge_top;
  import axi_apb_pkg::*;
  localparam int unsigned AW = 32, DW = 32, NS = 16, DEPTH = 256, BL = 4;

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
    repeat (400000) @(posedge CLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (observed on the internal buses) ----
  int n_single_wr = 0, n_single_rd = 0, n_burst_wr = 0, n_burst_rd = 0;
  int n_wait = 0, n_slverr = 0, n_decerr = 0;
  int n_apb_to [NS];

  always @(posedge CLK) begin
    if (!RST) begin
      if (dut.penable && (dut.psel & ~dut.pready) != '0) n_wait++;
      for (int k = 0; k < NS; k++)
        if (dut.psel[k] && dut.penable && dut.pready[k]) begin
          n_apb_to[k]++;
          if (dut.pslverr[k]) n_slverr++;
        end
      if ((dut.bvalid && dut.bready && dut.bresp == RESP_DECERR) ||
          (dut.rvalid && dut.rready && dut.rresp == RESP_DECERR)) n_decerr++;
    end
  end

  // ---------------- reference model ----------------
  logic [DW-1:0] ref_mem [NS][DEPTH];

  function automatic bit bad_addr(input logic [AW-1:0] a);
    return (a[AW-1:16] != '0) || (a[11:2] >= DEPTH);
  endfunction

  // ---------------- user-side command ----------------
  int beat_cnt = 0;
  always @(posedge CLK) if (BEAT_DONE) beat_cnt++;

  // Runs one command and returns its length in cycles (WR_EN/RD_EN cycle to
  // the done pulse) and the data of each read beat.
  task automatic command(input bit w, input bit burst, input logic [AW-1:0] a,
                         input logic [DW-1:0] d[], output logic [DW-1:0] rd[],
                         output bit err, output int cycles);
    int n = burst ? BL : 1;
    int c0, b0;
    rd = new[n];
    @(negedge CLK);
    check(!BUSY, "idle before command");
    if (w) begin WR_EN = 1; WR_BURST = burst; WR_ADDR = a; DATA_IN = d[0]; end
    else   begin RD_EN = 1; RD_BURST = burst; RD_ADDR = a; end
    c0 = cycle;
    b0 = beat_cnt;
    @(negedge CLK);
    WR_EN = 0; RD_EN = 0; WR_BURST = 0; RD_BURST = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge CLK);
      while (!BEAT_DONE) @(posedge CLK);
      rd[i] = DATA_OUT;
      if (w && i + 1 < n) begin #1 DATA_IN = d[i + 1]; end
    end
    @(posedge CLK);
    while (!(WR_DONE || RD_DONE)) @(posedge CLK);
    check(w ? (WR_DONE && !RD_DONE) : (RD_DONE && !WR_DONE), "matching done pulse");
    err = RESP_ERR;
    cycles = cycle - c0;
    #1;
    check(beat_cnt - b0 == n, "one BEAT_DONE per beat");
    if (w) begin if (burst) n_burst_wr++; else n_single_wr++; end
    else   begin if (burst) n_burst_rd++; else n_single_rd++; end
  endtask

  // Write or read with full checking against the model.
  task automatic do_cmd(input bit w, input bit burst, input logic [AW-1:0] a, output int cycles);
    int n = burst ? BL : 1;
    logic [DW-1:0] d[], rd[];
    bit err, exp_err = 0;
    d = new[n];
    foreach (d[i]) d[i] = $urandom;
    command(w, burst, a, d, rd, err, cycles);
    for (int i = 0; i < n; i++) begin
      logic [AW-1:0] ba = a + AW'(4 * i);
      if (bad_addr(ba)) begin
        exp_err = 1;
      end else if (w) begin
        ref_mem[ba[15:12]][ba[11:2]] = d[i];
      end else begin
        check(rd[i] == ref_mem[ba[15:12]][ba[11:2]],
              $sformatf("read %h got %h expected %h", ba, rd[i], ref_mem[ba[15:12]][ba[11:2]]));
      end
    end
    check(err == exp_err, $sformatf("RESP_ERR %0d expected %0d at %h", err, exp_err, a));
  endtask

  function automatic logic [AW-1:0] slot_addr(input int k, input int word);
    return AW'(k) << 12 | AW'(word) << 2;
  endfunction

  initial begin
    int cyc;
    for (int k = 0; k < NS; k++) n_apb_to[k] = 0;
    repeat (3) @(posedge CLK);
    #1 RST = 0;

    // Latency of single and burst commands.
    do_cmd(1, 0, slot_addr(0, 0), cyc);
    check(cyc == 9, $sformatf("single write takes 9 cycles (%0d)", cyc));
    do_cmd(0, 0, slot_addr(0, 0), cyc);
    check(cyc == 9, $sformatf("single read takes 9 cycles (%0d)", cyc));
    do_cmd(1, 1, slot_addr(1, 4), cyc);
    check(cyc == 9 + 3 * 9, $sformatf("4-beat burst write takes 36 cycles (%0d)", cyc));
    do_cmd(0, 1, slot_addr(1, 4), cyc);
    check(cyc == 9 + 3 * 7, $sformatf("4-beat burst read takes 30 cycles (%0d)", cyc));

    // Fill every word of every slave, then read it all back.
    for (int k = 0; k < NS; k++)
      for (int i = 0; i < DEPTH; i += BL) do_cmd(1, 1, slot_addr(k, i), cyc);
    for (int k = 0; k < NS; k++)
      for (int i = 0; i < DEPTH; i += BL) do_cmd(0, 1, slot_addr(k, i), cyc);

    // Random mix, with slave errors and decode errors.
    for (int n = 0; n < 2000; n++) begin
      automatic int k = $urandom_range(NS - 1);
      automatic int word = $urandom_range(DEPTH - 1);
      automatic logic [AW-1:0] a;
      automatic bit burst = $urandom_range(1);
      if (burst && word > DEPTH - BL) word = DEPTH - BL;
      a = slot_addr(k, word);
      case ($urandom_range(15))
        0: a = slot_addr(k, $urandom_range(DEPTH, 1023 - BL));   // past the memory
        1: a[AW-1:16] = 16'($urandom_range(1, 16'hFFFF));        // past the last slot
        2: if (burst) a = slot_addr(k, DEPTH - 2);               // burst runs off the end
        default: ;
      endcase
      do_cmd($urandom_range(1), burst, a, cyc);
    end

    // Mechanism coverage.
    check(n_single_wr > 0, "single write happened");
    check(n_single_rd > 0, "single read happened");
    check(n_burst_wr > 0, "burst write happened");
    check(n_burst_rd > 0, "burst read happened");
    check(n_wait > 0, "APB wait states happened");
    check(n_slverr > 0, "PSLVERR happened");
    check(n_decerr > 0, "DECERR happened");
    for (int k = 0; k < NS; k++) check(n_apb_to[k] > 0, $sformatf("slave %0d was accessed", k));
    $display("single wr %0d rd %0d, burst wr %0d rd %0d, wait cycles %0d, slverr %0d, decerr %0d",
             n_single_wr, n_single_rd, n_burst_wr, n_burst_rd, n_wait, n_slverr, n_decerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
