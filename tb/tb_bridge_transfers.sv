// tb_bridge_transfers -- replays three reference transfer sequences through
// the bridge and checks every value on both buses.
//
//  1. Byte reads: a NONSEQ/SEQ run of byte reads from 0x84EB_9E8C..0x84EB_9E8F.
//     The peripheral answers 32'h1215_3524, 32'hC089_5E81, 32'h8484_D609,
//     32'hB1F0_5663; HRDATA must be 32'h24, 32'h5E, 32'h84, 32'hB1 (byte lane
//     0, 1, 2, 3, right-justified) and PSEL 3'b010.
//  2. Halfword writes to 0x8186_D230, ..D232, ..D234, ..D236 with HWDATA
//     32'hAC46_BA74, 32'h225F_0E4A, 32'hB1FA_1BEB, 32'h3ACD_607C; PWDATA must
//     be 32'h0000_BA74, 32'h0000_225F, 32'h0000_1BEB, 32'h0000_3ACD and
//     PSEL 3'b001.
//  3. Back to back: a word write of 32'h58D5_8BF3 to 0x88B1_EAD6 followed by a
//     word read of 0x8642_784F answered with 32'h1215_3524; PWDATA must be
//     32'h58D5_8BF3, HRDATA 32'h1215_3524, PSEL 3'b100 then 3'b010. Both
//     addresses are misaligned and are forwarded unchanged on PADDR.
// HCLK and PCLK are one clock here. PADDR, PWRITE, PSEL and PWDATA of every
// APB transfer, HRDATA and HRESP of every read, and the number of HCLK cycles
// each sequence takes (fixed, since the clocks are equal; see FIRST_RD,
// FIRST_WR, NEXT_DP) are checked.
`timescale 1ns/1ps
module tb_bridge_transfers;

  // HCLK cycles of a data phase with equal clocks: a read that finds the
  // handshake idle takes 10 (1 to latch, 1 to raise PENDRD, 3 to reach SETUP,
  // ACCESS, PDONE, 2 to synchronise PDONE, 1 to finish); a write one more, as
  // its data arrives a cycle later. A transfer that follows directly has to
  // wait for the previous handshake to return to zero and takes 14.
  localparam int FIRST_RD = 10;
  localparam int FIRST_WR = 11;
  localparam int NEXT_DP  = 14;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rstn = 1'b0;
  logic        hsel = 1'b0, hwrite = 1'b0;
  logic [1:0]  htrans = 2'b00;
  logic [31:0] haddr = '0, hwdata = '0;
  logic [2:0]  hsize = '0;
  logic        hreadyout, hresp;
  logic [31:0] hrdata;
  logic [2:0]  psel;
  logic        penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;

  ahb2apb_bridge dut (
    .hclk(clk), .hresetn(rstn), .hsel, .htrans, .haddr, .hwrite, .hsize, .hwdata,
    .hready_in(hreadyout), .hreadyout, .hresp, .hrdata,
    .pclk(clk), .presetn(rstn), .psel, .penable, .paddr, .pwrite, .pwdata, .prdata);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  typedef struct {
    logic [31:0] addr;
    logic        write;
    logic [2:0]  size;
    logic [1:0]  trans;
    logic [31:0] wdata;    // HWDATA (write)
    logic [31:0] prdata;   // what the peripheral answers (read)
    logic [31:0] exp;      // PWDATA (write) or HRDATA (read)
    logic [2:0]  sel;      // expected PSEL
  } step_t;

  step_t seq[$];

  // peripheral: answers the PRDATA of the transfer now on the APB
  int apb_idx = 0;
  step_t apb_cur;
  assign prdata = (apb_idx < seq.size()) ? seq[apb_idx].prdata : 32'h0;
  always @(posedge clk) if (rstn && penable) begin
    if (apb_idx >= seq.size()) begin
      check(1'b0, "APB transfer beyond the sequence");
    end else begin
      apb_cur = seq[apb_idx];
      check(paddr == apb_cur.addr, $sformatf("PADDR %h exp %h", paddr, apb_cur.addr));
      check(pwrite == apb_cur.write, "PWRITE wrong");
      check(psel == apb_cur.sel, $sformatf("PSEL %b exp %b at %h", psel, apb_cur.sel, paddr));
      if (apb_cur.write)
        check(pwdata == apb_cur.exp, $sformatf("PWDATA %h exp %h", pwdata, apb_cur.exp));
      apb_idx <= apb_idx + 1;
    end
  end

  // Pipelined AHB master over seq; returns the HCLK cycles it took.
  task automatic run(output int cycles);
    int ap = 0, dp = -1, n = seq.size();
    bit ready;
    cycles = 0;
    apb_idx = 0;
    @(posedge clk); #1;
    hsel = 1'b1; htrans = seq[0].trans; haddr = seq[0].addr;
    hwrite = seq[0].write; hsize = seq[0].size;
    forever begin
      @(negedge clk);
      ready = hreadyout;
      if (ready && dp >= 0) begin
        check(hresp == 1'b0, "HRESP not OKAY");
        if (!seq[dp].write)
          check(hrdata == seq[dp].exp, $sformatf("HRDATA %h exp %h", hrdata, seq[dp].exp));
      end
      @(posedge clk); #1;
      cycles++;
      if (ready) begin
        dp = (ap < n) ? ap : -1;
        ap++;
        hwdata = (dp >= 0 && seq[dp].write) ? seq[dp].wdata : 32'hDEAD_BEEF;
        if (ap < n) begin
          htrans = seq[ap].trans; haddr = seq[ap].addr;
          hwrite = seq[ap].write; hsize = seq[ap].size;
        end else begin
          htrans = 2'b00; hsel = 1'b0;
        end
        if (dp < 0) break;
      end
    end
  endtask

  function automatic step_t rd(input logic [31:0] a, input logic [2:0] sz, input logic [1:0] tr,
                               input logic [31:0] pr, input logic [31:0] e, input logic [2:0] sel);
    return '{addr: a, write: 1'b0, size: sz, trans: tr, wdata: 32'h0, prdata: pr, exp: e, sel: sel};
  endfunction
  function automatic step_t wr(input logic [31:0] a, input logic [2:0] sz, input logic [1:0] tr,
                               input logic [31:0] wd, input logic [31:0] e, input logic [2:0] sel);
    return '{addr: a, write: 1'b1, size: sz, trans: tr, wdata: wd, prdata: 32'h0, exp: e, sel: sel};
  endfunction

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rstn = 1'b1;

    // 1. byte reads
    seq = {};
    seq.push_back(rd(32'h84EB_9E8C, 3'd0, 2'b10, 32'h1215_3524, 32'h0000_0024, 3'b010));
    seq.push_back(rd(32'h84EB_9E8D, 3'd0, 2'b11, 32'hC089_5E81, 32'h0000_005E, 3'b010));
    seq.push_back(rd(32'h84EB_9E8E, 3'd0, 2'b11, 32'h8484_D609, 32'h0000_0084, 3'b010));
    seq.push_back(rd(32'h84EB_9E8F, 3'd0, 2'b11, 32'hB1F0_5663, 32'h0000_00B1, 3'b010));
    run(cyc);
    check(apb_idx == 4, "sequence 1: not all reads reached the APB");
    check(cyc == 1 + FIRST_RD + 3 * NEXT_DP,
          $sformatf("sequence 1 took %0d cycles, exp %0d", cyc, 1 + FIRST_RD + 3 * NEXT_DP));
    repeat (5) @(posedge clk);

    // 2. halfword writes
    seq = {};
    seq.push_back(wr(32'h8186_D230, 3'd1, 2'b10, 32'hAC46_BA74, 32'h0000_BA74, 3'b001));
    seq.push_back(wr(32'h8186_D232, 3'd1, 2'b11, 32'h225F_0E4A, 32'h0000_225F, 3'b001));
    seq.push_back(wr(32'h8186_D234, 3'd1, 2'b11, 32'hB1FA_1BEB, 32'h0000_1BEB, 3'b001));
    seq.push_back(wr(32'h8186_D236, 3'd1, 2'b11, 32'h3ACD_607C, 32'h0000_3ACD, 3'b001));
    run(cyc);
    check(apb_idx == 4, "sequence 2: not all writes reached the APB");
    check(cyc == 1 + FIRST_WR + 3 * NEXT_DP,
          $sformatf("sequence 2 took %0d cycles, exp %0d", cyc, 1 + FIRST_WR + 3 * NEXT_DP));
    repeat (5) @(posedge clk);

    // 3. write then read, back to back
    seq = {};
    seq.push_back(wr(32'h88B1_EAD6, 3'd2, 2'b10, 32'h58D5_8BF3, 32'h58D5_8BF3, 3'b100));
    seq.push_back(rd(32'h8642_784F, 3'd2, 2'b10, 32'h1215_3524, 32'h1215_3524, 3'b010));
    run(cyc);
    check(apb_idx == 2, "sequence 3: not both transfers reached the APB");
    check(cyc == 1 + FIRST_WR + NEXT_DP,
          $sformatf("sequence 3 took %0d cycles, exp %0d", cyc, 1 + FIRST_WR + NEXT_DP));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
