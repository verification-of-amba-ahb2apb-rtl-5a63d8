// tb_apb_access -- self-checking test of the APB master block.
//
// The testbench plays the AHB side: it sets up a request record, raises
// PENDWR or PENDRD, waits for PDONE, drops the request and waits for PDONE to
// fall (four-phase handshake). A peripheral model answers PRDATA with a
// function of PADDR (PADDR rotated left by 8, xor 32'hA5A5_5A5A). The two clocks run
// unrelated (PCLK 8 ns, HCLK 10 ns in the handshake driver).
// Checked for random reads and writes to all three peripherals:
//  * PSEL rises at the SYNC_STAGES + 1'th PCLK edge counting the first one
//    that samples the request high, one-hot and matching the address map;
//  * SETUP lasts one PCLK cycle, ACCESS (PENABLE) one, and PADDR, PWRITE,
//    PWDATA equal the request throughout;
//  * exactly one APB transfer happens per request, even though the request
//    stays high until PDONE has been seen;
//  * PDONE rises right after ACCESS, rdata holds the PRDATA of ACCESS, and
//    PDONE falls after the request is dropped;
//  * no select and no PENABLE for an address outside the map.
`timescale 1ns/1ps
module tb_apb_access;
  import ahb2apb_pkg::*;

  localparam int NS = 3;
  int checks = 0, failures = 0;

  logic          pclk = 1'b0, presetn = 1'b0, hclk = 1'b0;
  logic          pendwr = 1'b0, pendrd = 1'b0;
  apb_req_t      req = '0;
  logic          pdone;
  logic [31:0]   rdata;
  logic [NS-1:0] psel;
  logic          penable, pwrite;
  logic [31:0]   paddr, pwdata, prdata;

  apb_access #(.NUM_SLAVES(NS), .SYNC_STAGES(2)) dut (.*);

  always #4 pclk = ~pclk;
  always #5 hclk = ~hclk;

  function automatic logic [31:0] periph(input logic [31:0] a);
    return {a[23:0], a[31:24]} ^ 32'hA5A5_5A5A;
  endfunction
  assign prdata = periph(paddr);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // APB monitor: counts transfers and checks their shape
  int n_xfers = 0, setup_len = 0;
  logic [31:0] last_prdata;
  logic [NS-1:0] exp_sel;
  apb_req_t cur;
  always @(posedge pclk) if (presetn) begin
    if (|psel && !penable) begin
      setup_len++;
      check(setup_len == 1, "SETUP longer than one cycle");
    end
    if (penable) begin
      check(setup_len == 1, "ACCESS without SETUP");
      check(psel == exp_sel, $sformatf("PSEL %b exp %b", psel, exp_sel));
      check(paddr == cur.addr && pwrite == pendwr, "PADDR/PWRITE wrong in ACCESS");
      if (pwrite) check(pwdata == cur.wdata, "PWDATA wrong in ACCESS");
      last_prdata = prdata;
      n_xfers++;
      setup_len = 0;
    end
    check(!(penable && $past(penable)), "ACCESS longer than one cycle");
  end

  // latency from the request to PSEL, counted in PCLK edges
  int lat;
  task automatic one(input logic [31:0] addr, input logic write, input logic [31:0] wd,
                     input logic [NS-1:0] sel);
    int n0;
    @(posedge hclk);
    req.addr = addr; req.write = write; req.size = 3'd2; req.wdata = wd;
    cur = req; exp_sel = sel;
    n0 = n_xfers;
    @(posedge hclk);
    if (write) pendwr = 1'b1; else pendrd = 1'b1;
    // first PCLK edge that samples the request
    @(posedge pclk);
    lat = 0;
    while (psel == '0 && lat < 20 && !(sel == '0 && pdone)) begin
      @(posedge pclk);
      lat++;
      #0.1;
    end
    if (sel != '0) check(lat == 2, $sformatf("PSEL %0d PCLK edges after the sampling edge, expected 2", lat));
    while (!pdone) @(posedge hclk);
    // the request stays high a while; no second transfer may start
    repeat (6) @(posedge hclk);
    check(n_xfers == n0 + (sel != '0), $sformatf("%0d APB transfers for one request", n_xfers - n0));
    if (!write && sel != '0) check(rdata == periph(addr), $sformatf("rdata %h exp %h", rdata, periph(addr)));
    if (!write && sel != '0) check(rdata == last_prdata, "rdata is not the PRDATA of ACCESS");
    pendwr = 1'b0; pendrd = 1'b0;
    repeat (2) @(posedge hclk);
    check(pdone, "PDONE fell before the request was seen low");
    repeat (6) @(posedge hclk);
    check(!pdone, "PDONE did not fall after the request dropped");
    check(psel == '0 && !penable, "bus not idle after the transfer");
    check(paddr == addr, "PADDR not held after the transfer");
  endtask

  initial begin
    repeat (3) @(posedge pclk);
    presetn = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int s;
      logic [31:0] a;
      s = $urandom_range(0, NS - 1);
      a = 32'h8000_0000 + (32'(s) << 26) + ($urandom & 32'h03FF_FFFC);
      one(a, 1'($urandom_range(0, 1)), $urandom, NS'(1 << s));
    end
    // address outside the map: no select, handshake still completes
    one(32'h9000_0000, 1'b0, 32'h0, '0);
    check(n_xfers >= 200, "too few transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
