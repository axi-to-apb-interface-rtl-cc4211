// apb_slave: APB4 completer that fronts one apb_mem word memory.
//
// In the SETUP phase of a transfer (PSEL high, PENABLE low) the slave checks
// the address. An address inside the memory starts a memory write or read
// request in the next cycle; PREADY is then held low through the ACCESS
// phase until the memory answers with wr_done or rd_done, so every access
// carries APB wait states. An address past the end of the memory is not
// passed on: the ACCESS phase completes at once with PSLVERR high. The slave
// occupies a 2**REGION_BITS byte region of the APB address map; only
// PADDR[REGION_BITS-1:2] (the word offset in that region) is looked at.
//
// Timing with apb_mem (one-cycle memory): SETUP in cycle t, request in t+1,
// done in t+2, PREADY high in t+3, i.e. two wait states. An error
// completes with no wait state. PRDATA and PSLVERR are valid only while
// PREADY is high in the ACCESS phase.
//
// The APB4 signal set follows the AMBA APB 4.0 signal list; the memory
// handshake (request, write-done, read-done), the region size and the error
// rule are this design's choices.
module apb_slave
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH  = 32,
  parameter int unsigned DATA_WIDTH  = 32,
  parameter int unsigned MEM_DEPTH   = 256,
  parameter int unsigned REGION_BITS = 12,
  localparam int unsigned MAW        = (MEM_DEPTH > 1) ? $clog2(MEM_DEPTH) : 1,
  localparam int unsigned NBYTES     = DATA_WIDTH / 8
) (
  input  logic                  PCLK,
  input  logic                  PRESETn,
  // APB4 completer port
  input  logic                  PSEL,
  input  logic                  PENABLE,
  input  logic                  PWRITE,
  input  logic [ADDR_WIDTH-1:0] PADDR,
  input  logic [PROT_WIDTH-1:0] PPROT,
  input  logic [DATA_WIDTH-1:0] PWDATA,
  input  logic [NBYTES-1:0]     PSTRB,
  output logic                  PREADY,
  output logic [DATA_WIDTH-1:0] PRDATA,
  output logic                  PSLVERR,
  // memory port
  output logic                  mem_wr_en,
  output logic                  mem_rd_en,
  output logic [MAW-1:0]        mem_addr,
  output logic [DATA_WIDTH-1:0] mem_wdata,
  output logic [NBYTES-1:0]     mem_strb,
  input  logic [DATA_WIDTH-1:0] mem_rdata,
  input  logic                  mem_wr_done,
  input  logic                  mem_rd_done
);

  typedef enum logic [1:0] {
    S_IDLE,   // waiting for a SETUP phase
    S_BUSY,   // memory request issued, PREADY low
    S_READY,  // memory answered, PREADY high
    S_ERROR   // bad address, PREADY and PSLVERR high
  } state_e;

  state_e state;

  localparam int unsigned WORD_BITS = REGION_BITS - 2;

  logic [WORD_BITS-1:0] word_idx;
  logic                 in_range;
  logic                 setup;

  assign word_idx = PADDR[REGION_BITS-1:2];
  assign in_range = ({{(32 - WORD_BITS){1'b0}}, word_idx} < 32'(MEM_DEPTH));
  assign setup    = PSEL && !PENABLE;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      state     <= S_IDLE;
      mem_wr_en <= 1'b0;
      mem_rd_en <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      mem_strb  <= '0;
      PRDATA    <= '0;
    end else begin
      mem_wr_en <= 1'b0;
      mem_rd_en <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (setup) begin
            if (in_range) begin
              mem_wr_en <= PWRITE;
              mem_rd_en <= !PWRITE;
              mem_addr  <= MAW'(word_idx);
              mem_wdata <= PWDATA;
              mem_strb  <= PSTRB;
              state     <= S_BUSY;
            end else begin
              state     <= S_ERROR;
            end
          end
        end
        S_BUSY: begin
          if (mem_wr_done || mem_rd_done) begin
            if (mem_rd_done) PRDATA <= mem_rdata;
            state <= S_READY;
          end
        end
        S_READY, S_ERROR: begin
          // The ACCESS phase ends in this cycle.
          if (PSEL && PENABLE) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign PREADY  = (state == S_READY) || (state == S_ERROR);
  assign PSLVERR = (state == S_ERROR) && PSEL && PENABLE;

endmodule
