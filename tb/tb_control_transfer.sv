// tb_control_transfer -- self-checking test of the request holding register.
//
// The testbench acts as ahb_response: it pulses load with a random address,
// direction and size, supplies HWDATA in the following cycle (as an AHB
// master does in the data phase) and releases the request after a random
// hold time, while it keeps changing haddr and hwdata to make sure the held
// request does not follow the bus. Checked against a byte-by-byte reference:
//  * req_ready rises one cycle after load for a read and two for a write;
//  * req.addr, req.write, req.size hold the loaded values until release;
//  * req.wdata holds the right-justified lanes of the data-phase HWDATA;
//  * rdata_fmt is the right-justified lanes of apb_rdata for the held request;
//  * busy is high from load to release.
`timescale 1ns/1ps
module tb_control_transfer;
  import ahb2apb_pkg::*;

  int checks = 0, failures = 0;

  logic        hclk = 1'b0, hresetn = 1'b0;
  logic        load = 1'b0, hwrite = 1'b0, release_req = 1'b0;
  logic [31:0] haddr = '0, hwdata = '0, apb_rdata = '0;
  logic [2:0]  hsize = '0;
  apb_req_t    req;
  logic        req_ready, busy;
  logic [31:0] rdata_fmt;

  control_transfer dut (.*);

  always #5 hclk = ~hclk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [31:0] pick(input logic [31:0] w, input logic [1:0] off,
                                       input logic [2:0] size);
    logic [31:0] r = '0;
    int nb = (size == 0) ? 1 : (size == 1) ? 2 : 4;
    int first = (int'(off) / nb) * nb;   // offset rounded down to the size
    for (int b = 0; b < nb; b++) r[8*b +: 8] = w[8*(first+b) +: 8];
    return r;
  endfunction

  initial begin
    logic [31:0] a, d, rd;
    logic        w;
    logic [2:0]  sz;
    int          n;
    repeat (2) @(negedge hclk);
    hresetn = 1'b1;
    @(negedge hclk);
    check(!req_ready && !busy, "not empty after reset");
    for (int t = 0; t < 300; t++) begin
      sz = 3'($urandom_range(0, 2));
      a  = $urandom;   // misaligned addresses included
      w  = 1'($urandom_range(0, 1));
      d  = $urandom;
      // address phase
      load = 1'b1; haddr = a; hwrite = w; hsize = sz; hwdata = $urandom;
      @(negedge hclk);
      // data phase: the bus moves on
      load = 1'b0; hwdata = d; haddr = $urandom; hwrite = ~w; hsize = 3'($urandom);
      check(busy, "busy not set after load");
      check(req_ready == !w, $sformatf("req_ready one cycle after load: %b", req_ready));
      @(negedge hclk);
      hwdata = $urandom;
      check(req_ready, "req_ready not set two cycles after load");
      n = $urandom_range(0, 6);
      repeat (n) begin
        rd = $urandom;
        apb_rdata = rd;
        #1;
        check(req.addr == a && req.write == w && req.size == sz, "held control changed");
        if (w) check(req.wdata == pick(d, a[1:0], sz),
                     $sformatf("wdata %h exp %h", req.wdata, pick(d, a[1:0], sz)));
        check(rdata_fmt == pick(rd, a[1:0], sz),
              $sformatf("rdata_fmt %h exp %h", rdata_fmt, pick(rd, a[1:0], sz)));
        haddr = $urandom; hwdata = $urandom;
        @(negedge hclk);
      end
      check(req_ready && busy, "request lost before release");
      release_req = 1'b1;
      @(negedge hclk);
      release_req = 1'b0;
      check(!req_ready && !busy, "not empty after release");
      repeat ($urandom_range(0, 2)) @(negedge hclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
