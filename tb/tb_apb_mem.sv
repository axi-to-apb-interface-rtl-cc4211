// tb_apb_mem: self-checking test of apb_mem.
// Writes random words with random byte strobes to random addresses, keeps a
// reference copy of the memory in the testbench, and reads every touched
// word back. Checks the data, the byte-lane masking and that wr_done and
// rd_done pulse exactly one cycle after their request and at no other time.
module tb_apb_mem;
  localparam int unsigned DW = 32;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [3:0] strb = '0;
  logic wr_done, rd_done;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [DEPTH];
  bit written [DEPTH];

  apb_mem #(.DATA_WIDTH(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_write(input logic [AW-1:0] a, input logic [DW-1:0] d, input logic [3:0] s);
    @(negedge clk);
    wr_en = 1'b1; addr = a; wdata = d; strb = s;
    @(negedge clk);
    wr_en = 1'b0;
    check(wr_done && !rd_done, "wr_done one cycle after write");
    @(negedge clk);
    check(!wr_done, "wr_done is a single pulse");
    for (int b = 0; b < 4; b++) if (s[b]) ref_mem[a][b*8 +: 8] = d[b*8 +: 8];
  endtask

  task automatic do_read(input logic [AW-1:0] a);
    @(negedge clk);
    rd_en = 1'b1; addr = a;
    @(negedge clk);
    rd_en = 1'b0;
    check(rd_done && !wr_done, "rd_done one cycle after read");
    check(rdata == ref_mem[a], $sformatf("read %0d got %h expected %h", a, rdata, ref_mem[a]));
    @(negedge clk);
    check(!rd_done, "rd_done is a single pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Full-word writes to every location first, so nothing is unknown.
    for (int i = 0; i < DEPTH; i++) begin
      do_write(AW'(i), $urandom, 4'hF);
      written[i] = 1'b1;
    end
    // Partial writes with random strobes.
    for (int i = 0; i < 100; i++) do_write(AW'($urandom_range(DEPTH - 1)), $urandom, 4'($urandom));
    for (int i = 0; i < DEPTH; i++) do_read(AW'(i));
    // Strobe lanes one at a time on a known word.
    do_write(AW'(3), 32'h0000_0000, 4'hF);
    do_write(AW'(3), 32'hAABB_CCDD, 4'b0101);
    do_read(AW'(3));
    check(ref_mem[3] == 32'h00BB_00DD, "reference strobe model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
