// axi_master: command-driven AXI4-Lite master.
//
// A user port of plain enables turns into AXI4-Lite transactions. With the
// master idle (busy low), wr_en starts a write of data_in to wr_addr and
// rd_en a read of rd_addr; wr_en wins if both are high. With wr_burst (or
// rd_burst) high alongside, the command is a burst of BURST_LEN beats to
// consecutive words, wr_addr, wr_addr + DATA_WIDTH/8, and so on. AXI4-Lite
// has no bursts, so each beat is a separate single AXI4-Lite transaction.
//
// Each write beat raises AWVALID and WVALID together, lowers each on its own
// handshake, then waits for the B response with BREADY high. Each read beat
// raises ARVALID and then waits for R with RREADY high. At the end of every
// beat beat_done pulses for one cycle; for a read, data_out then holds the
// beat's data. A write takes its first word from data_in together with
// wr_en; in a burst, each further word is taken from data_in at the end of
// the cycle after the previous beat's beat_done pulse, so a user that sees
// beat_done at a clock edge has one cycle to present the next word.
// wr_done or rd_done pulses in the cycle after the last beat ends, and
// resp_err tells whether any beat of the command got a non-OKAY response.
//
// Following the source: the user port of the reference system (write and
// read address, data in and out, write/read enable, write/read burst, write
// and read done) and a burst of four beats at consecutive addresses. This
// design's choices: byte addresses stepping by a word, the beat_done
// handshake for burst data, and AWPROT/ARPROT fixed at zero (unprivileged,
// secure, data access).
module axi_master
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned BURST_LEN  = 4,
  localparam int unsigned NBYTES    = DATA_WIDTH / 8,
  localparam int unsigned CW        = (BURST_LEN > 1) ? $clog2(BURST_LEN) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // user command port
  input  logic [ADDR_WIDTH-1:0] wr_addr,
  input  logic [ADDR_WIDTH-1:0] rd_addr,
  input  logic [DATA_WIDTH-1:0] data_in,
  input  logic                  wr_en,
  input  logic                  rd_en,
  input  logic                  wr_burst,
  input  logic                  rd_burst,
  output logic                  busy,
  output logic                  beat_done,
  output logic                  wr_done,
  output logic                  rd_done,
  output logic [DATA_WIDTH-1:0] data_out,
  output logic                  resp_err,
  // AXI4-Lite manager port
  output logic                  AWVALID,
  input  logic                  AWREADY,
  output logic [ADDR_WIDTH-1:0] AWADDR,
  output logic [PROT_WIDTH-1:0] AWPROT,
  output logic                  WVALID,
  input  logic                  WREADY,
  output logic [DATA_WIDTH-1:0] WDATA,
  output logic [NBYTES-1:0]     WSTRB,
  input  logic                  BVALID,
  output logic                  BREADY,
  input  logic [1:0]            BRESP,
  output logic                  ARVALID,
  input  logic                  ARREADY,
  output logic [ADDR_WIDTH-1:0] ARADDR,
  output logic [PROT_WIDTH-1:0] ARPROT,
  input  logic                  RVALID,
  output logic                  RREADY,
  input  logic [DATA_WIDTH-1:0] RDATA,
  input  logic [1:0]            RRESP
);

  typedef enum logic [2:0] {
    M_IDLE,    // waiting for a command
    M_WADDR,   // AW and/or W beat outstanding
    M_WRESP,   // waiting for B
    M_RADDR,   // AR beat outstanding
    M_RDATA,   // waiting for R
    M_DONE,    // command finished, done pulse
    M_WGAP,    // burst write: beat_done high, user updates data_in
    M_WLOAD    // burst write: take the next beat's data_in
  } state_e;

  state_e                state;
  logic                  is_write;
  logic [CW-1:0]         beats_left;   // beats after the current one
  logic [ADDR_WIDTH-1:0] addr;

  localparam logic [ADDR_WIDTH-1:0] STEP = ADDR_WIDTH'(NBYTES);

  assign AWADDR = addr;
  assign ARADDR = addr;
  assign AWPROT = '0;
  assign ARPROT = '0;
  assign WSTRB  = '1;
  assign BREADY = (state == M_WRESP);
  assign RREADY = (state == M_RDATA);
  assign busy   = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      is_write   <= 1'b0;
      beats_left <= '0;
      addr       <= '0;
      AWVALID    <= 1'b0;
      WVALID     <= 1'b0;
      WDATA      <= '0;
      ARVALID    <= 1'b0;
      beat_done  <= 1'b0;
      wr_done    <= 1'b0;
      rd_done    <= 1'b0;
      data_out   <= '0;
      resp_err   <= 1'b0;
    end else begin
      beat_done <= 1'b0;
      wr_done   <= 1'b0;
      rd_done   <= 1'b0;
      unique case (state)
        M_IDLE: begin
          if (wr_en) begin
            is_write   <= 1'b1;
            addr       <= wr_addr;
            beats_left <= wr_burst ? CW'(BURST_LEN - 1) : '0;
            AWVALID    <= 1'b1;
            WVALID     <= 1'b1;
            WDATA      <= data_in;
            resp_err   <= 1'b0;
            state      <= M_WADDR;
          end else if (rd_en) begin
            is_write   <= 1'b0;
            addr       <= rd_addr;
            beats_left <= rd_burst ? CW'(BURST_LEN - 1) : '0;
            ARVALID    <= 1'b1;
            resp_err   <= 1'b0;
            state      <= M_RADDR;
          end
        end
        M_WADDR: begin
          if (AWREADY) AWVALID <= 1'b0;
          if (WREADY)  WVALID  <= 1'b0;
          if ((AWREADY || !AWVALID) && (WREADY || !WVALID)) state <= M_WRESP;
        end
        M_WRESP: begin
          if (BVALID) begin
            beat_done <= 1'b1;
            if (BRESP != RESP_OKAY) resp_err <= 1'b1;
            if (beats_left == '0) begin
              state <= M_DONE;
            end else begin
              beats_left <= beats_left - 1'b1;
              addr       <= addr + STEP;
              state      <= M_WGAP;
            end
          end
        end
        M_WGAP: state <= M_WLOAD;
        M_WLOAD: begin
          AWVALID <= 1'b1;
          WVALID  <= 1'b1;
          WDATA   <= data_in;
          state   <= M_WADDR;
        end
        M_RADDR: begin
          if (ARREADY) begin
            ARVALID <= 1'b0;
            state   <= M_RDATA;
          end
        end
        M_RDATA: begin
          if (RVALID) begin
            beat_done <= 1'b1;
            data_out  <= RDATA;
            if (RRESP != RESP_OKAY) resp_err <= 1'b1;
            if (beats_left == '0) begin
              state <= M_DONE;
            end else begin
              beats_left <= beats_left - 1'b1;
              addr       <= addr + STEP;
              ARVALID    <= 1'b1;
              state      <= M_RADDR;
            end
          end
        end
        M_DONE: begin
          wr_done <= is_write;
          rd_done <= !is_write;
          state   <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // A VALID, once raised, stays up until its READY.
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (AWVALID && !AWREADY) |=> AWVALID && $stable(AWADDR));
  a_wvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (WVALID && !WREADY) |=> WVALID && $stable(WDATA));
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (ARVALID && !ARREADY) |=> ARVALID && $stable(ARADDR));

endmodule
