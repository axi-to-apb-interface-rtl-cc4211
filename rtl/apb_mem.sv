// apb_mem: the word memory that sits behind each APB slave.
//
// A write request (wr_en) stores wdata at word addr, byte lane i only where
// strb[i] is set, and answers with a one-cycle wr_done pulse in the next
// cycle. A read request (rd_en) returns the stored word on rdata together
// with a one-cycle rd_done pulse in the next cycle; rdata then holds until
// the next read. A request is one cycle wide; the two enables are never
// raised together by apb_slave (a write wins if they are).
//
// Timing: request in cycle t, done pulse (and read data) in cycle t+1.
// The array is not reset: a word reads back as whatever was last written.
// The depth and the one-cycle latency are this design's choice; the
// separate write-done and read-done pulses follow the memory module of the
// reference simulation.
module apb_mem #(
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned DEPTH      = 256,
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NBYTES    = DATA_WIDTH / 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic                  rd_en,
  input  logic [AW-1:0]         addr,
  input  logic [DATA_WIDTH-1:0] wdata,
  input  logic [NBYTES-1:0]     strb,
  output logic [DATA_WIDTH-1:0] rdata,
  output logic                  wr_done,
  output logic                  rd_done
);

  logic [DATA_WIDTH-1:0] mem [DEPTH];

  // Storage: byte-lane masked write, registered read.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < NBYTES; b++) begin
        if (strb[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
      end
    end else if (rd_en) begin
      rdata <= mem[addr];
    end
  end

  // Completion pulses.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_done <= 1'b0;
      rd_done <= 1'b0;
    end else begin
      wr_done <= wr_en;
      rd_done <= rd_en && !wr_en;
    end
  end

endmodule
