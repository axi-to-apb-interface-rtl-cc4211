// axi4lite2apb: AXI4-Lite slave to APB4 master bridge for up to sixteen APB
// slaves.
//
// The bridge appears as a slave on the AXI4-Lite bus and as the only master
// on the APB. Each AXI4-Lite write (an AW and a W beat, in either order) or
// read (an AR beat) becomes one APB4 transfer: a SETUP cycle with PSEL of
// the addressed slave high and PENABLE low, then ACCESS cycles with PENABLE
// high until that slave raises PREADY. The slave's PSLVERR turns into a
// SLVERR response, its PRDATA into RDATA. One transaction is in flight at a
// time; while it runs, the next AW, W and AR beats can already be accepted
// into one-deep holding registers. When a write and a read are both ready,
// they take turns.
//
// Address map: slave k owns the 2**SLOT_BITS byte region starting at
// k * 2**SLOT_BITS, so PADDR[SLOT_BITS +: 4] picks the PSEL line. An
// address above the last slave's region is answered with DECERR and no APB
// transfer. PADDR, PPROT, PWRITE, PWDATA and PSTRB are shared by all
// slaves; PSTRB is WSTRB for writes and zero for reads. PREADY, PRDATA and
// PSLVERR come in one per slave and are taken from the selected slave only.
//
// Timing (ACLK and PCLK are the same clock): a write whose AW and W beats
// are accepted in cycle t has its SETUP cycle in t+2 and its first ACCESS
// cycle in t+3; BVALID rises in the cycle after the ACCESS cycle in which
// PREADY is high (t+4 with no wait states). Reads behave the same from the
// AR beat to RVALID. BVALID/RVALID stay high until BREADY/RREADY.
//
// Following the source: the AXI4-Lite and APB4 signal lists, the
// VALID/READY handshake, sixteen slaves, conversion of each transfer and the
// clocking of both buses by one clock. This design's choices: the address
// map, the DECERR rule, the holding registers and the turn-taking between
// reads and writes.
module axi4lite2apb
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 32,
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned NUM_SLAVES = 16,
  parameter int unsigned SLOT_BITS  = 12,
  localparam int unsigned NBYTES    = DATA_WIDTH / 8,
  localparam int unsigned SW        = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  logic                         ACLK,
  input  logic                         ARESETn,
  // AXI4-Lite write address channel
  input  logic                         AWVALID,
  output logic                         AWREADY,
  input  logic [ADDR_WIDTH-1:0]        AWADDR,
  input  logic [PROT_WIDTH-1:0]        AWPROT,
  // AXI4-Lite write data channel
  input  logic                         WVALID,
  output logic                         WREADY,
  input  logic [DATA_WIDTH-1:0]        WDATA,
  input  logic [NBYTES-1:0]            WSTRB,
  // AXI4-Lite write response channel
  output logic                         BVALID,
  input  logic                         BREADY,
  output logic [1:0]                   BRESP,
  // AXI4-Lite read address channel
  input  logic                         ARVALID,
  output logic                         ARREADY,
  input  logic [ADDR_WIDTH-1:0]        ARADDR,
  input  logic [PROT_WIDTH-1:0]        ARPROT,
  // AXI4-Lite read data channel
  output logic                         RVALID,
  input  logic                         RREADY,
  output logic [DATA_WIDTH-1:0]        RDATA,
  output logic [1:0]                   RRESP,
  // APB4 requester port
  output logic [ADDR_WIDTH-1:0]        PADDR,
  output logic [PROT_WIDTH-1:0]        PPROT,
  output logic [NUM_SLAVES-1:0]        PSEL,
  output logic                         PENABLE,
  output logic                         PWRITE,
  output logic [DATA_WIDTH-1:0]        PWDATA,
  output logic [NBYTES-1:0]            PSTRB,
  input  logic [NUM_SLAVES-1:0]        PREADY,
  input  logic [NUM_SLAVES-1:0][DATA_WIDTH-1:0] PRDATA,
  input  logic [NUM_SLAVES-1:0]        PSLVERR
);

  typedef enum logic [2:0] {
    B_IDLE,    // choose the next transaction
    B_SETUP,   // APB SETUP phase
    B_ACCESS,  // APB ACCESS phase, waiting for PREADY
    B_WRESP,   // BVALID high
    B_RRESP    // RVALID high
  } state_e;

  state_e state;

  if (NUM_SLAVES > MAX_APB_SLAVES || NUM_SLAVES < 1) begin : g_bad_num_slaves
    $error("axi4lite2apb: NUM_SLAVES must be 1 to 16");
  end

  // One-deep holding registers for the three request channels.
  logic                  aw_full, w_full, ar_full;
  logic [ADDR_WIDTH-1:0] aw_addr, ar_addr;
  logic [PROT_WIDTH-1:0] aw_prot, ar_prot;
  logic [DATA_WIDTH-1:0] w_data;
  logic [NBYTES-1:0]     w_strb;

  // Transaction being performed.
  logic [SW-1:0]         sel_idx;
  logic                  last_was_write;
  axi_resp_e             resp;
  logic [DATA_WIDTH-1:0] rdata_q;

  logic wr_pending, rd_pending, start_wr, start_rd;
  logic [ADDR_WIDTH-1:0] start_addr;
  logic addr_hit;

  assign AWREADY = !aw_full;
  assign WREADY  = !w_full;
  assign ARREADY = !ar_full;

  assign wr_pending = aw_full && w_full;
  assign rd_pending = ar_full;
  // Turn-taking: a write goes first unless the previous transaction was a
  // write and a read is waiting.
  assign start_wr   = (state == B_IDLE) && wr_pending && !(rd_pending && last_was_write);
  assign start_rd   = (state == B_IDLE) && rd_pending && !start_wr;
  assign start_addr = start_wr ? aw_addr : ar_addr;

  // The address lies in a slave slot when nothing above the slot index is set.
  always_comb begin
    addr_hit = 1'b1;
    for (int i = 0; i < ADDR_WIDTH; i++) begin
      if (i >= SLOT_BITS + SW && start_addr[i]) addr_hit = 1'b0;
    end
    if (NUM_SLAVES < (1 << SW) &&
        32'(start_addr[SLOT_BITS +: SW]) >= 32'(NUM_SLAVES)) addr_hit = 1'b0;
  end

  always_ff @(posedge ACLK or negedge ARESETn) begin
    if (!ARESETn) begin
      state          <= B_IDLE;
      aw_full        <= 1'b0;
      w_full         <= 1'b0;
      ar_full        <= 1'b0;
      aw_addr        <= '0;
      ar_addr        <= '0;
      aw_prot        <= '0;
      ar_prot        <= '0;
      w_data         <= '0;
      w_strb         <= '0;
      sel_idx        <= '0;
      last_was_write <= 1'b0;
      resp           <= RESP_OKAY;
      rdata_q        <= '0;
      PADDR          <= '0;
      PPROT          <= '0;
      PWRITE         <= 1'b0;
      PWDATA         <= '0;
      PSTRB          <= '0;
    end else begin
      // Accept request beats into the holding registers.
      if (AWVALID && AWREADY) begin
        aw_full <= 1'b1;
        aw_addr <= AWADDR;
        aw_prot <= AWPROT;
      end
      if (WVALID && WREADY) begin
        w_full <= 1'b1;
        w_data <= WDATA;
        w_strb <= WSTRB;
      end
      if (ARVALID && ARREADY) begin
        ar_full <= 1'b1;
        ar_addr <= ARADDR;
        ar_prot <= ARPROT;
      end

      unique case (state)
        B_IDLE: begin
          if (start_wr || start_rd) begin
            last_was_write <= start_wr;
            PADDR          <= start_addr;
            PPROT          <= start_wr ? aw_prot : ar_prot;
            PWRITE         <= start_wr;
            PWDATA         <= start_wr ? w_data : '0;
            PSTRB          <= start_wr ? w_strb : '0;
            sel_idx        <= start_addr[SLOT_BITS +: SW];
            rdata_q        <= '0;
            if (start_wr) begin
              aw_full <= 1'b0;
              w_full  <= 1'b0;
            end else begin
              ar_full <= 1'b0;
            end
            if (addr_hit) begin
              state <= B_SETUP;
            end else begin
              resp  <= RESP_DECERR;
              state <= start_wr ? B_WRESP : B_RRESP;
            end
          end
        end
        B_SETUP: state <= B_ACCESS;
        B_ACCESS: begin
          if (PREADY[sel_idx]) begin
            resp    <= PSLVERR[sel_idx] ? RESP_SLVERR : RESP_OKAY;
            rdata_q <= PWRITE ? '0 : PRDATA[sel_idx];
            state   <= PWRITE ? B_WRESP : B_RRESP;
          end
        end
        B_WRESP: if (BREADY) state <= B_IDLE;
        B_RRESP: if (RREADY) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    PSEL = '0;
    if (state == B_SETUP || state == B_ACCESS) PSEL[sel_idx] = 1'b1;
  end
  assign PENABLE = (state == B_ACCESS);

  assign BVALID = (state == B_WRESP);
  assign BRESP  = resp;
  assign RVALID = (state == B_RRESP);
  assign RRESP  = resp;
  assign RDATA  = rdata_q;

  // Protocol rules the bridge must keep.
  a_penable_needs_psel: assert property (@(posedge ACLK) disable iff (!ARESETn)
    PENABLE |-> (PSEL != '0));
  a_psel_onehot: assert property (@(posedge ACLK) disable iff (!ARESETn)
    $onehot0(PSEL));
  a_setup_then_access: assert property (@(posedge ACLK) disable iff (!ARESETn)
    ((PSEL != '0) && !PENABLE) |=> PENABLE && $stable(PSEL) && $stable(PADDR) && $stable(PWRITE));
  a_access_stable: assert property (@(posedge ACLK) disable iff (!ARESETn)
    (PENABLE && !PREADY[sel_idx]) |=> PENABLE && $stable(PSEL) && $stable(PADDR) && $stable(PWDATA));
  a_bvalid_hold: assert property (@(posedge ACLK) disable iff (!ARESETn)
    (BVALID && !BREADY) |=> BVALID && $stable(BRESP));
  a_rvalid_hold: assert property (@(posedge ACLK) disable iff (!ARESETn)
    (RVALID && !RREADY) |=> RVALID && $stable(RDATA) && $stable(RRESP));

endmodule
