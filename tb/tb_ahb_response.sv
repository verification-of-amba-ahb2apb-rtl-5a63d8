// tb_ahb_response -- self-checking test of the AHB slave interface block.
//
// The testbench plays the AHB master, control_transfer (req_ready, rdata_fmt)
// and the APB side (PDONE) around ahb_response. Inputs change on the falling
// edge of HCLK; outputs are checked just before the rising edge.
//
// Checked:
//  * a valid NONSEQ/SEQ transfer with HSEL and HREADY high gives one load
//    pulse in its address phase; IDLE, BUSY, HSEL low or HREADY low give none;
//  * HREADYOUT drops for the data phase; PENDRD (read) or PENDWR (write) is
//    raised only once req_ready is high and PDONE is low, never both;
//  * HREADYOUT returns exactly three HCLK edges after PDONE rises (two
//    synchroniser flops and the state update), with HRDATA equal to
//    rdata_fmt for a read and release_req high in that last cycle;
//  * unmapped addresses and HSIZE above a word get no load and the
//    two-cycle ERROR response; a misaligned address is forwarded;
//  * a new request waits until PDONE of the previous one has fallen.
`timescale 1ns/1ps
module tb_ahb_response;

  int checks = 0, failures = 0;

  logic        hclk = 1'b0, hresetn = 1'b0;
  logic        hsel = 1'b0, hwrite = 1'b0, hready_in = 1'b1;
  logic [1:0]  htrans = 2'b00;
  logic [31:0] haddr = '0;
  logic [2:0]  hsize = 3'd2;
  logic        hreadyout, hresp;
  logic [31:0] hrdata;
  logic        load, release_req;
  logic        req_ready = 1'b0;
  logic [31:0] rdata_fmt = '0;
  logic        pendwr, pendrd;
  logic        pdone = 1'b0;

  ahb_response #(.NUM_SLAVES(3), .SYNC_STAGES(2)) dut (.*);

  always #5 hclk = ~hclk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // PENDWR and PENDRD are never high together
  always @(posedge hclk) if (hresetn) check(!(pendwr && pendrd), "both request lines high");

  task automatic idle_bus();
    hsel = 1'b0; htrans = 2'b00;
  endtask

  // One valid transfer, handshake answered after ack_delay cycles.
  task automatic do_transfer(input logic [31:0] addr, input logic write,
                             input logic [2:0] size, input logic [1:0] trans,
                             input logic [31:0] rdata, input int ready_delay,
                             input int ack_delay);
    int n;
    @(negedge hclk);
    hsel = 1'b1; htrans = trans; haddr = addr; hwrite = write; hsize = size;
    #1 check(hreadyout == 1'b1, "HREADYOUT low in address phase");
    check(load == 1'b1, "no load for a valid transfer");
    @(negedge hclk);
    idle_bus();
    check(hreadyout == 1'b0, "HREADYOUT not low in data phase");
    check(hresp == 1'b0, "HRESP not OKAY for valid transfer");
    repeat (ready_delay) begin
      check(!pendwr && !pendrd, "request raised before req_ready");
      @(negedge hclk);
    end
    req_ready = 1'b1;
    rdata_fmt = rdata;
    // request rises one edge later
    @(negedge hclk);
    check(pendwr == write && pendrd == !write, "wrong request line");
    repeat (ack_delay) @(negedge hclk);
    pdone = 1'b1;
    n = 0;
    while (!hreadyout && n < 50) begin
      @(posedge hclk);
      n++;
      #1;
    end
    check(n == 3, $sformatf("HREADYOUT back after %0d edges, expected 3", n));
    check(!pendwr && !pendrd, "request not dropped at completion");
    if (!write) check(hrdata == rdata, "HRDATA differs from rdata_fmt");
    req_ready = 1'b0;
    // PDONE falls some cycles later (APB side sees the request drop)
    @(negedge hclk);
    @(negedge hclk);
    pdone = 1'b0;
  endtask

  int loads = 0, releases = 0;
  always @(posedge hclk) begin
    if (load) loads++;
    if (release_req) releases++;
  end

  task automatic do_invalid(input logic [31:0] addr, input logic [2:0] size);
    int l0;
    @(negedge hclk);
    l0 = loads;
    hsel = 1'b1; htrans = 2'b10; haddr = addr; hwrite = 1'b1; hsize = size;
    #1 check(load == 1'b0, "load for an invalid transfer");
    @(negedge hclk);
    idle_bus();
    check(hresp == 1'b1 && hreadyout == 1'b0, "first ERROR cycle wrong");
    @(negedge hclk);
    check(hresp == 1'b1 && hreadyout == 1'b1, "second ERROR cycle wrong");
    @(negedge hclk);
    check(hresp == 1'b0 && hreadyout == 1'b1, "ERROR not ended");
    check(loads == l0, "invalid transfer was forwarded");
    check(!pendwr && !pendrd, "request for an invalid transfer");
  endtask

  task automatic no_accept(input logic s, input logic [1:0] t, input logic rdy);
    @(negedge hclk);
    hsel = s; htrans = t; hready_in = rdy; haddr = 32'h8000_0010; hsize = 3'd2;
    #1 check(load == 1'b0, "load without a transfer");
    @(negedge hclk);
    idle_bus(); hready_in = 1'b1;
    check(hreadyout == 1'b1, "stalled without a transfer");
  endtask

  initial begin
    repeat (3) @(negedge hclk);
    hresetn = 1'b1;
    // reads and writes of each size to each peripheral
    do_transfer(32'h8186_D230, 1'b1, 3'd1, 2'b10, 32'h0,          0, 2);
    do_transfer(32'h84EB_9E8C, 1'b0, 3'd0, 2'b10, 32'h0000_0024, 1, 3);
    do_transfer(32'h8800_0004, 1'b0, 3'd2, 2'b11, 32'h1215_3524, 2, 0);
    do_transfer(32'h8000_0003, 1'b1, 3'd0, 2'b11, 32'h0,          0, 5);
    do_transfer(32'h8400_0002, 1'b0, 3'd1, 2'b10, 32'h0000_5E81, 3, 1);
    // transfers that must be ignored
    no_accept(1'b1, 2'b00, 1'b1);  // IDLE
    no_accept(1'b1, 2'b01, 1'b1);  // BUSY
    no_accept(1'b0, 2'b10, 1'b1);  // not selected
    no_accept(1'b1, 2'b10, 1'b0);  // another slave still in its data phase
    // invalid transfers
    do_invalid(32'h4000_0000, 3'd2);  // below the map
    do_invalid(32'h8C00_0000, 3'd2);  // above the map
    do_invalid(32'h8000_0000, 3'd3);  // 64-bit transfer
    do_invalid(32'h8400_0000, 3'd4);  // 128-bit transfer
    // misaligned addresses are forwarded
    do_transfer(32'h8642_784F, 1'b0, 3'd2, 2'b10, 32'h1215_3524, 0, 1);
    // a request must wait for PDONE of the previous one to fall
    @(negedge hclk);
    pdone = 1'b1;  // previous acknowledge still standing
    repeat (3) @(negedge hclk);
    hsel = 1'b1; htrans = 2'b10; haddr = 32'h8000_0100; hwrite = 1'b0; hsize = 3'd2;
    @(negedge hclk);
    idle_bus(); req_ready = 1'b1;
    repeat (5) begin
      @(negedge hclk);
      check(!pendrd, "request raised while PDONE still high");
    end
    pdone = 1'b0;
    repeat (4) @(negedge hclk);
    check(pendrd, "request not raised after PDONE fell");
    pdone = 1'b1;
    repeat (4) @(negedge hclk);
    check(hreadyout && !pendrd, "transfer did not complete");
    req_ready = 1'b0; pdone = 1'b0;
    repeat (4) @(negedge hclk);
    check(loads == 7, $sformatf("expected 7 loads, saw %0d", loads));
    check(releases == 7, $sformatf("expected 7 releases, saw %0d", releases));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
