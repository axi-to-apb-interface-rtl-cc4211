// tb_apb_slave: self-checking test of apb_slave.
// The testbench acts as APB requester and as the memory: its memory model
// answers each request after a random delay of 1 to 4 cycles. Checks that
// the request carries the right word index, data and strobes, that PREADY
// stays low until the memory has answered and rises in the cycle after
// the done pulse, that read data comes back on PRDATA, and that an address
// past the memory completes without wait state and with PSLVERR.
module tb_apb_slave;
  import axi_apb_pkg::*;
  localparam int unsigned DW = 32;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned MAW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [31:0] paddr = '0;
  logic [PROT_WIDTH-1:0] pprot = '0;
  logic [DW-1:0] pwdata = '0, prdata;
  logic [3:0] pstrb = '0;
  logic pready, pslverr;
  logic mem_wr_en, mem_rd_en, mem_wr_done = 1'b0, mem_rd_done = 1'b0;
  logic [MAW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata = '0;
  logic [3:0] mem_strb;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [DEPTH];
  int mem_delay = 1;
  int done_cycle = -1, cycle = 0;

  apb_slave #(.DATA_WIDTH(DW), .MEM_DEPTH(DEPTH)) dut (
    .PCLK(clk), .PRESETn(rst_n), .PSEL(psel), .PENABLE(penable), .PWRITE(pwrite),
    .PADDR(paddr), .PPROT(pprot), .PWDATA(pwdata), .PSTRB(pstrb), .PREADY(pready),
    .PRDATA(prdata), .PSLVERR(pslverr), .mem_wr_en(mem_wr_en), .mem_rd_en(mem_rd_en),
    .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_strb(mem_strb), .mem_rdata(mem_rdata),
    .mem_wr_done(mem_wr_done), .mem_rd_done(mem_rd_done));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Memory model with a variable answer delay.
  initial begin
    forever begin
      @(posedge clk);
      if (mem_wr_en || mem_rd_en) begin
        automatic logic w = mem_wr_en;
        automatic logic [MAW-1:0] a = mem_addr;
        automatic logic [DW-1:0] d = mem_wdata;
        automatic logic [3:0] s = mem_strb;
        repeat (mem_delay - 1) @(posedge clk);
        #1;
        if (w) begin
          for (int b = 0; b < 4; b++) if (s[b]) ref_mem[a][b*8 +: 8] = d[b*8 +: 8];
          mem_wr_done = 1'b1;
        end else begin
          mem_rdata = ref_mem[a];
          mem_rd_done = 1'b1;
        end
        done_cycle = cycle;
        @(posedge clk);
        #1;
        mem_wr_done = 1'b0;
        mem_rd_done = 1'b0;
      end
    end
  end

  // One APB transfer; returns read data and error, counts wait states.
  task automatic apb(input logic w, input logic [31:0] a, input logic [DW-1:0] d,
                     input logic [3:0] s, output logic [DW-1:0] rd, output logic err,
                     output int waits);
    @(negedge clk);
    psel = 1'b1; penable = 1'b0; pwrite = w; paddr = a; pwdata = d; pstrb = w ? s : 4'h0;
    @(negedge clk);
    penable = 1'b1;
    #1;
    waits = 0;
    while (!pready) begin
      check(!pslverr, "PSLVERR only with PREADY");
      waits++;
      @(negedge clk);
      if (waits > 50) break;
    end
    check(cycle == done_cycle + 1 || err_expected(a), "PREADY rises the cycle after done");
    rd = prdata;
    err = pslverr;
    @(posedge clk);
    #1;
    psel = 1'b0; penable = 1'b0;
  endtask

  function automatic bit err_expected(input logic [31:0] a);
    return a[11:2] >= DEPTH;
  endfunction

  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] rd;
  logic err;
  int waits;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!pready && !pslverr && !mem_wr_en && !mem_rd_en, "idle after reset");
    for (int i = 0; i < DEPTH; i++) begin
      automatic logic [DW-1:0] d = $urandom;
      mem_delay = 1 + (i % 4);
      apb(1'b1, 32'(i * 4), d, 4'hF, rd, err, waits);
      model[i] = d;
      check(!err, "write no error");
      check(waits == mem_delay + 1, $sformatf("write waits %0d for delay %0d", waits, mem_delay));
      check(ref_mem[i] == d, "memory got the write");
    end
    for (int n = 0; n < 200; n++) begin
      automatic int i = $urandom_range(DEPTH - 1);
      automatic logic w = 1'($urandom);
      automatic logic [DW-1:0] d = $urandom;
      automatic logic [3:0] s = 4'($urandom);
      mem_delay = $urandom_range(1, 4);
      apb(w, 32'(i * 4) | 32'(32'($urandom_range(15)) << 12), d, s, rd, err, waits);
      check(!err, "no error in range");
      check(waits == mem_delay + 1, "wait states follow memory delay");
      if (w) begin
        for (int b = 0; b < 4; b++) if (s[b]) model[i][b*8 +: 8] = d[b*8 +: 8];
      end else begin
        check(rd == model[i], $sformatf("read %0d got %h expected %h", i, rd, model[i]));
      end
    end
    // Out of range: error with no wait state and no memory request.
    for (int n = 0; n < 10; n++) begin
      automatic logic [31:0] a = 32'(($urandom_range(DEPTH, 1023)) * 4);
      done_cycle = -10;
      apb(1'($urandom), a, $urandom, 4'hF, rd, err, waits);
      check(err, "out-of-range address gives PSLVERR");
      check(waits == 0, "error completes with no wait state");
      check(done_cycle == -10, "no memory request on error");
    end
    // Back to normal after errors.
    mem_delay = 2;
    apb(1'b0, 32'h8, '0, 4'h0, rd, err, waits);
    check(!err && rd == model[2], "read after error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
