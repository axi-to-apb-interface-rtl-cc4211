// tb_axi4lite2apb: self-checking test of the AXI4-Lite to APB4 bridge.
//
// The testbench is the AXI4-Lite master and sixteen APB slaves. Each APB
// slave model keeps its own words, adds 0 to 3 random wait states and
// answers PSLVERR for word offsets 0xC00-0xFFF of its 4 KB slot. A
// reference model predicts every response: OKAY with the data last written
// (byte strobes applied), SLVERR in the error window, DECERR above the
// sixteen slots with no APB transfer at all. Every APB transfer is compared
// with the AXI transaction that caused it (slave select, address, direction,
// data, strobes, protection), the AW/W beats are sent in all three orders,
// BREADY/RREADY are held back at random, a write and a read are issued at
// once to see both served, and the zero-wait latency is measured.
module tb_axi4lite2apb;
  import axi_apb_pkg::*;
  localparam int unsigned AW = 32, DW = 32, NS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;
  logic [AW-1:0] awaddr = '0, araddr = '0;
  logic [2:0] awprot = '0, arprot = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic [AW-1:0] paddr;
  logic [2:0] pprot;
  logic [NS-1:0] psel, pready = '0, pslverr = '0;
  logic penable, pwrite;
  logic [DW-1:0] pwdata;
  logic [3:0] pstrb;
  logic [NS-1:0][DW-1:0] prdata = '0;

  axi4lite2apb dut (
    .ACLK(clk), .ARESETn(rst_n),
    .AWVALID(awvalid), .AWREADY(awready), .AWADDR(awaddr), .AWPROT(awprot),
    .WVALID(wvalid), .WREADY(wready), .WDATA(wdata), .WSTRB(wstrb),
    .BVALID(bvalid), .BREADY(bready), .BRESP(bresp),
    .ARVALID(arvalid), .ARREADY(arready), .ARADDR(araddr), .ARPROT(arprot),
    .RVALID(rvalid), .RREADY(rready), .RDATA(rdata), .RRESP(rresp),
    .PADDR(paddr), .PPROT(pprot), .PSEL(psel), .PENABLE(penable), .PWRITE(pwrite),
    .PWDATA(pwdata), .PSTRB(pstrb), .PREADY(pready), .PRDATA(prdata), .PSLVERR(pslverr));

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- APB slave models ----------------
  logic [DW-1:0] slave_mem [NS][1024];
  int  max_waits = 3;
  int  waits_left = 0;
  int  apb_count = 0;
  // Last completed APB transfer.
  int  last_slave;
  logic [AW-1:0] last_addr;
  logic last_write;
  logic [DW-1:0] last_wdata;
  logic [3:0] last_strb;
  logic [2:0] last_prot;
  int  setup_cycle = -1;

  function automatic int sel_index(input logic [NS-1:0] s);
    for (int i = 0; i < NS; i++) if (s[i]) return i;
    return -1;
  endfunction

  function automatic bit err_window(input logic [AW-1:0] a);
    return a[11:10] == 2'b11;
  endfunction

  always @(negedge clk) begin
    pready  <= '0;
    pslverr <= '0;
    if (psel != '0 && !penable) begin
      waits_left <= $urandom_range(max_waits);
      setup_cycle <= cycle;
    end else if (psel != '0 && penable) begin
      automatic int k = sel_index(psel);
      if (waits_left == 0) begin
        pready[k]  <= 1'b1;
        pslverr[k] <= err_window(paddr);
        prdata[k]  <= slave_mem[k][paddr[11:2]];
      end else begin
        waits_left <= waits_left - 1;
        prdata[k]  <= $urandom;   // not valid while PREADY is low
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && psel != '0 && penable && pready[sel_index(psel)]) begin
      automatic int k = sel_index(psel);
      apb_count++;
      last_slave = k; last_addr = paddr; last_write = pwrite;
      last_wdata = pwdata; last_strb = pstrb; last_prot = pprot;
      if (pwrite && !err_window(paddr))
        for (int b = 0; b < 4; b++) if (pstrb[b]) slave_mem[k][paddr[11:2]][b*8 +: 8] <= pwdata[b*8 +: 8];
    end
  end

  // ---------------- reference model ----------------
  logic [DW-1:0] ref_mem [NS][1024];

  function automatic logic [1:0] expect_resp(input logic [AW-1:0] a);
    if (a[AW-1:16] != '0) return RESP_DECERR;
    if (err_window(a)) return RESP_SLVERR;
    return RESP_OKAY;
  endfunction

  // ---------------- AXI master tasks ----------------
  int bready_delay_max = 2;
  int aw_cycle, w_cycle, b_cycle, ar_cycle, r_cycle;

  task automatic send_aw(input logic [AW-1:0] a, input logic [2:0] p);
    @(negedge clk);
    awvalid = 1; awaddr = a; awprot = p;
    @(posedge clk);
    while (!awready) @(posedge clk);
    aw_cycle = cycle;
    #1 awvalid = 0;
  endtask

  task automatic send_w(input logic [DW-1:0] d, input logic [3:0] s);
    @(negedge clk);
    wvalid = 1; wdata = d; wstrb = s;
    @(posedge clk);
    while (!wready) @(posedge clk);
    w_cycle = cycle;
    #1 wvalid = 0;
  endtask

  task automatic get_b(output logic [1:0] r);
    repeat ($urandom_range(bready_delay_max)) @(negedge clk);
    @(negedge clk);
    bready = 1;
    @(posedge clk);
    while (!bvalid) @(posedge clk);
    r = bresp;
    b_cycle = cycle;
    #1 bready = 0;
  endtask

  task automatic get_r(output logic [1:0] r, output logic [DW-1:0] d);
    repeat ($urandom_range(bready_delay_max)) @(negedge clk);
    @(negedge clk);
    rready = 1;
    @(posedge clk);
    while (!rvalid) @(posedge clk);
    r = rresp; d = rdata;
    r_cycle = cycle;
    #1 rready = 0;
  endtask

  task automatic axi_write(input logic [AW-1:0] a, input logic [DW-1:0] d, input logic [3:0] s,
                           input logic [2:0] p, input int order);
    logic [1:0] r;
    int n_before = apb_count;
    logic [1:0] er = expect_resp(a);
    case (order)
      0: fork send_aw(a, p); send_w(d, s); join
      1: begin send_aw(a, p); repeat (2) @(negedge clk); send_w(d, s); end
      default: begin send_w(d, s); repeat (2) @(negedge clk); send_aw(a, p); end
    endcase
    get_b(r);
    check(r == er, $sformatf("write %h resp %0d expected %0d", a, r, er));
    if (er == RESP_DECERR) begin
      check(apb_count == n_before, "no APB transfer on DECERR");
    end else begin
      check(apb_count == n_before + 1, "exactly one APB transfer per write");
      check(last_slave == int'(a[15:12]), "PSEL of the addressed slave");
      check(last_addr == a && last_write && last_wdata == d && last_strb == s && last_prot == p,
            $sformatf("APB write fields for %h", a));
      if (er == RESP_OKAY)
        for (int b = 0; b < 4; b++) if (s[b]) ref_mem[a[15:12]][a[11:2]][b*8 +: 8] = d[b*8 +: 8];
    end
  endtask

  task automatic axi_read(input logic [AW-1:0] a, input logic [2:0] p);
    logic [1:0] r;
    logic [DW-1:0] d;
    int n_before = apb_count;
    logic [1:0] er = expect_resp(a);
    @(negedge clk);
    arvalid = 1; araddr = a; arprot = p;
    @(posedge clk);
    while (!arready) @(posedge clk);
    ar_cycle = cycle;
    #1 arvalid = 0;
    get_r(r, d);
    check(r == er, $sformatf("read %h resp %0d expected %0d", a, r, er));
    if (er == RESP_DECERR) begin
      check(apb_count == n_before, "no APB transfer on DECERR");
    end else begin
      check(apb_count == n_before + 1, "exactly one APB transfer per read");
      check(last_slave == int'(a[15:12]) && last_addr == a && !last_write &&
            last_strb == 4'h0 && last_prot == p, $sformatf("APB read fields for %h", a));
      if (er == RESP_OKAY)
        check(d == ref_mem[a[15:12]][a[11:2]],
              $sformatf("read %h got %h expected %h", a, d, ref_mem[a[15:12]][a[11:2]]));
    end
  endtask

  function automatic logic [AW-1:0] rand_addr(input bit legal);
    logic [AW-1:0] a;
    a = {16'h0, 4'($urandom), 2'($urandom_range(2)), 8'($urandom), 2'b00};
    if (!legal) a[AW-1:16] = 16'($urandom_range(1, 16'hFFFF));
    return a;
  endfunction

  initial begin
    logic [1:0] r;
    logic [DW-1:0] d;
    for (int k = 0; k < NS; k++)
      for (int i = 0; i < 1024; i++) begin
        slave_mem[k][i] = 32'h0;
        ref_mem[k][i] = 32'h0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!bvalid && !rvalid && psel == '0 && !penable, "idle after reset");

    // Zero-wait latency.
    max_waits = 0; bready_delay_max = 0;
    axi_write(32'h0000_3010, 32'hCAFE_F00D, 4'hF, 3'b010, 0);
    check(setup_cycle - aw_cycle == 2, $sformatf("SETUP two cycles after AW/W (%0d)", setup_cycle - aw_cycle));
    check(b_cycle - aw_cycle == 4, $sformatf("B handshake four cycles after AW/W (%0d)", b_cycle - aw_cycle));
    axi_read(32'h0000_3010, 3'b001);
    check(r_cycle - ar_cycle == 4, $sformatf("R handshake four cycles after AR (%0d)", r_cycle - ar_cycle));

    // Every slave, every order, random traffic.
    max_waits = 3; bready_delay_max = 3;
    for (int k = 0; k < NS; k++) begin
      axi_write({16'h0, 4'(k), 12'h100}, 32'h1000_0000 + k, 4'hF, 3'b000, k % 3);
      axi_read({16'h0, 4'(k), 12'h100}, 3'b000);
    end
    for (int n = 0; n < 600; n++) begin
      automatic bit legal = ($urandom_range(19) != 0);
      automatic logic [AW-1:0] a = rand_addr(legal);
      if ($urandom_range(9) == 0) a[11:10] = 2'b11;   // slave error window
      if ($urandom_range(1))
        axi_write(a, $urandom, 4'($urandom), 3'($urandom), $urandom_range(2));
      else
        axi_read(a, 3'($urandom));
    end

    // A write and a read offered together: both must complete correctly.
    for (int n = 0; n < 20; n++) begin
      automatic logic [AW-1:0] wa = rand_addr(1), ra = rand_addr(1);
      automatic logic [DW-1:0] wd = $urandom;
      logic [1:0] br;
      automatic int n_before = apb_count;
      if (ra[15:2] == wa[15:2]) ra[2] = ~ra[2];
      fork
        begin fork send_aw(wa, 3'b000); send_w(wd, 4'hF); join get_b(br); end
        begin
          @(negedge clk); arvalid = 1; araddr = ra; arprot = 3'b000;
          @(posedge clk); while (!arready) @(posedge clk);
          #1 arvalid = 0;
          get_r(r, d);
        end
      join
      check(apb_count == n_before + 2, "both concurrent transactions reached the APB");
      check(br == expect_resp(wa) && r == expect_resp(ra), "concurrent responses");
      if (expect_resp(wa) == RESP_OKAY) ref_mem[wa[15:12]][wa[11:2]] = wd;
      if (expect_resp(ra) == RESP_OKAY)
        check(d == ref_mem[ra[15:12]][ra[11:2]], "concurrent read data");
    end

    // Final sweep: read back everything the model knows.
    for (int k = 0; k < NS; k++) axi_read({16'h0, 4'(k), 12'h100}, 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
