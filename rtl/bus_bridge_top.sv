// bus_bridge_top: an AXI4-Lite system with an APB peripheral bus behind a
// bridge.
//
// A command-driven AXI4-Lite master (axi_master) issues single and burst
// writes and reads. The AXI4-Lite to APB4 bridge (axi4lite2apb) converts
// each AXI4-Lite transaction into one APB4 transfer to one of NUM_SLAVES APB
// slaves. Every slave is an apb_slave in front of an apb_mem word memory.
// Bursts therefore reach the APB as a series of single transfers.
//
// Interface: the user command port of axi_master (CLK, RST, WR_ADDR,
// RD_ADDR, DATA_IN, WR_EN, RD_EN, WR_BURST, RD_BURST, WR_DONE, RD_DONE,
// DATA_OUT) plus BUSY, BEAT_DONE and RESP_ERR. RST is active high and
// asynchronous; both buses run on CLK.
//
// Address map: slave k holds byte addresses k*2**SLOT_BITS up to
// k*2**SLOT_BITS + 4*MEM_DEPTH - 1. The rest of a slot answers SLVERR,
// addresses past the last slot DECERR.
//
// Timing with the default slaves: a single write takes 9 cycles from the
// WR_EN cycle to the WR_DONE pulse, a single read the same. Each further
// burst beat adds 9 cycles to a write and 7 to a read, so a four-beat burst
// write takes 36 cycles and a four-beat burst read 30. Every APB transfer
// carries two wait states from the memory slave.
//
// The user port names, the sixteen APB slaves and the memory slaves follow
// the source; the address map, the memory depth and the widths are this
// design's choices.
module bus_bridge_top
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned NUM_SLAVES = 16,
  parameter int unsigned SLOT_BITS  = 12,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned BURST_LEN  = 4,
  localparam int unsigned NBYTES    = DATA_WIDTH / 8,
  localparam int unsigned MAW       = (MEM_DEPTH > 1) ? $clog2(MEM_DEPTH) : 1
) (
  input  logic                  CLK,
  input  logic                  RST,
  input  logic [ADDR_WIDTH-1:0] WR_ADDR,
  input  logic [ADDR_WIDTH-1:0] RD_ADDR,
  input  logic [DATA_WIDTH-1:0] DATA_IN,
  input  logic                  WR_EN,
  input  logic                  RD_EN,
  input  logic                  WR_BURST,
  input  logic                  RD_BURST,
  output logic                  BUSY,
  output logic                  BEAT_DONE,
  output logic                  WR_DONE,
  output logic                  RD_DONE,
  output logic [DATA_WIDTH-1:0] DATA_OUT,
  output logic                  RESP_ERR
);

  logic rst_n;
  assign rst_n = !RST;

  // AXI4-Lite bus between master and bridge
  logic                  awvalid, awready, wvalid, wready, bvalid, bready;
  logic                  arvalid, arready, rvalid, rready;
  logic [ADDR_WIDTH-1:0] awaddr, araddr;
  logic [PROT_WIDTH-1:0] awprot, arprot;
  logic [DATA_WIDTH-1:0] wdata, rdata;
  logic [NBYTES-1:0]     wstrb;
  logic [1:0]            bresp, rresp;

  // APB bus between bridge and slaves
  logic [ADDR_WIDTH-1:0] paddr;
  logic [PROT_WIDTH-1:0] pprot;
  logic [NUM_SLAVES-1:0] psel, pready, pslverr;
  logic                  penable, pwrite;
  logic [DATA_WIDTH-1:0] pwdata;
  logic [NBYTES-1:0]     pstrb;
  logic [NUM_SLAVES-1:0][DATA_WIDTH-1:0] prdata;

  axi_master #(
    .ADDR_WIDTH (ADDR_WIDTH),
    .DATA_WIDTH (DATA_WIDTH),
    .BURST_LEN  (BURST_LEN)
  ) u_master (
    .clk       (CLK),
    .rst_n     (rst_n),
    .wr_addr   (WR_ADDR),
    .rd_addr   (RD_ADDR),
    .data_in   (DATA_IN),
    .wr_en     (WR_EN),
    .rd_en     (RD_EN),
    .wr_burst  (WR_BURST),
    .rd_burst  (RD_BURST),
    .busy      (BUSY),
    .beat_done (BEAT_DONE),
    .wr_done   (WR_DONE),
    .rd_done   (RD_DONE),
    .data_out  (DATA_OUT),
    .resp_err  (RESP_ERR),
    .AWVALID   (awvalid),
    .AWREADY   (awready),
    .AWADDR    (awaddr),
    .AWPROT    (awprot),
    .WVALID    (wvalid),
    .WREADY    (wready),
    .WDATA     (wdata),
    .WSTRB     (wstrb),
    .BVALID    (bvalid),
    .BREADY    (bready),
    .BRESP     (bresp),
    .ARVALID   (arvalid),
    .ARREADY   (arready),
    .ARADDR    (araddr),
    .ARPROT    (arprot),
    .RVALID    (rvalid),
    .RREADY    (rready),
    .RDATA     (rdata),
    .RRESP     (rresp)
  );

  axi4lite2apb #(
    .ADDR_WIDTH (ADDR_WIDTH),
    .DATA_WIDTH (DATA_WIDTH),
    .NUM_SLAVES (NUM_SLAVES),
    .SLOT_BITS  (SLOT_BITS)
  ) u_bridge (
    .ACLK    (CLK),
    .ARESETn (rst_n),
    .AWVALID (awvalid),
    .AWREADY (awready),
    .AWADDR  (awaddr),
    .AWPROT  (awprot),
    .WVALID  (wvalid),
    .WREADY  (wready),
    .WDATA   (wdata),
    .WSTRB   (wstrb),
    .BVALID  (bvalid),
    .BREADY  (bready),
    .BRESP   (bresp),
    .ARVALID (arvalid),
    .ARREADY (arready),
    .ARADDR  (araddr),
    .ARPROT  (arprot),
    .RVALID  (rvalid),
    .RREADY  (rready),
    .RDATA   (rdata),
    .RRESP   (rresp),
    .PADDR   (paddr),
    .PPROT   (pprot),
    .PSEL    (psel),
    .PENABLE (penable),
    .PWRITE  (pwrite),
    .PWDATA  (pwdata),
    .PSTRB   (pstrb),
    .PREADY  (pready),
    .PRDATA  (prdata),
    .PSLVERR (pslverr)
  );

  for (genvar k = 0; k < NUM_SLAVES; k++) begin : g_slave
    logic                  mem_wr_en, mem_rd_en, mem_wr_done, mem_rd_done;
    logic [MAW-1:0]        mem_addr;
    logic [DATA_WIDTH-1:0] mem_wdata, mem_rdata;
    logic [NBYTES-1:0]     mem_strb;

    apb_slave #(
      .ADDR_WIDTH  (ADDR_WIDTH),
      .DATA_WIDTH  (DATA_WIDTH),
      .MEM_DEPTH   (MEM_DEPTH),
      .REGION_BITS (SLOT_BITS)
    ) u_slave (
      .PCLK        (CLK),
      .PRESETn     (rst_n),
      .PSEL        (psel[k]),
      .PENABLE     (penable),
      .PWRITE      (pwrite),
      .PADDR       (paddr),
      .PPROT       (pprot),
      .PWDATA      (pwdata),
      .PSTRB       (pstrb),
      .PREADY      (pready[k]),
      .PRDATA      (prdata[k]),
      .PSLVERR     (pslverr[k]),
      .mem_wr_en   (mem_wr_en),
      .mem_rd_en   (mem_rd_en),
      .mem_addr    (mem_addr),
      .mem_wdata   (mem_wdata),
      .mem_strb    (mem_strb),
      .mem_rdata   (mem_rdata),
      .mem_wr_done (mem_wr_done),
      .mem_rd_done (mem_rd_done)
    );

    apb_mem #(
      .DATA_WIDTH (DATA_WIDTH),
      .DEPTH      (MEM_DEPTH)
    ) u_mem (
      .clk     (CLK),
      .rst_n   (rst_n),
      .wr_en   (mem_wr_en),
      .rd_en   (mem_rd_en),
      .addr    (mem_addr),
      .wdata   (mem_wdata),
      .strb    (mem_strb),
      .rdata   (mem_rdata),
      .wr_done (mem_wr_done),
      .rd_done (mem_rd_done)
    );
  end

endmodule
