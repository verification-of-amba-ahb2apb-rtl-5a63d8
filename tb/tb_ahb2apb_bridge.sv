// tb_ahb2apb_bridge -- end-to-end, self-checking test of the AHB-to-APB bridge
// at its default parameters.
//
// A pipelined AHB master model drives randomised transfers: single reads and
// writes of byte, halfword and word size to all three peripherals, INCR4
// bursts (NONSEQ then SEQ), write-then-read-back pairs to one address, idle
// gaps, transfers addressed to another AHB slave (HSEL low) and invalid
// transfers (unmapped address, HSIZE above a word), and misaligned halfword
// and word transfers, which the bridge forwards. Three
// APB memory models answer on the APB side.
//
// Checks:
//  * every APB transfer matches the AHB transfer that caused it, in order:
//    PADDR, PWRITE, the one-hot PSEL and the right-justified PWDATA; no APB
//    transfer for unselected or invalid AHB transfers;
//  * every read returns the right-justified lanes of a reference memory that
//    follows the writes; HRESP is OKAY for valid transfers;
//  * invalid transfers get the two-cycle ERROR response;
//  * every APB transfer is exactly SETUP + ACCESS (checked by the models);
//  * with equal clocks, every data phase ends within MAX_DP_CYCLES.
// The run is repeated with PCLK at the HCLK frequency but shifted in phase,
// with a slower PCLK and with a faster PCLK. Each mechanism is counted and
// one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_ahb2apb_bridge;

  localparam int NS            = 3;
  localparam int N_PER_MODE    = 300;
  localparam int MAX_DP_CYCLES = 14;
  localparam int WD_CYCLES     = 200000;

  int checks = 0, failures = 0;

  logic        hclk = 1'b0, pclk = 1'b0;
  logic        hresetn = 1'b0, presetn = 1'b0;
  logic        hsel = 1'b0;
  logic [1:0]  htrans = 2'b00;
  logic [31:0] haddr = '0, hwdata = '0;
  logic        hwrite = 1'b0;
  logic [2:0]  hsize = 3'b000;
  logic        hready_in, hreadyout, hresp;
  logic [31:0] hrdata;
  logic [NS-1:0] psel;
  logic        penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;
  logic [31:0] prdata_s [NS];

  ahb2apb_bridge dut (
    .hclk, .hresetn, .hsel, .htrans, .haddr, .hwrite, .hsize, .hwdata,
    .hready_in, .hreadyout, .hresp, .hrdata,
    .pclk, .presetn, .psel, .penable, .paddr, .pwrite, .pwdata, .prdata
  );

  localparam logic [31:0] SEED [NS] = '{32'h1215_3524, 32'hC089_5E81, 32'h8484_D609};

  for (genvar s = 0; s < NS; s++) begin : g_slv
    apb_slave_mem #(.DEPTH(64), .INIT_SEED(SEED[s])) u_mem (
      .pclk, .presetn, .psel(psel[s]), .penable, .paddr, .pwrite, .pwdata,
      .prdata(prdata_s[s]));
  end
  assign prdata = prdata_s[0] | prdata_s[1] | prdata_s[2];

  // ---------------------------------------------------------------- clocks
  int pclk_half = 5;
  always #5 hclk = ~hclk;
  initial begin
    #3;
    forever begin
      case (pclk_half)
        5:       #5;
        11:      #11;
        default: #3;
      endcase
      pclk = ~pclk;
    end
  end

  // ------------------------------------------------------ reference model
  logic [31:0] ref_mem [NS][64];
  initial for (int s = 0; s < NS; s++)
    for (int i = 0; i < 64; i++) ref_mem[s][i] = SEED[s] ^ (i * 32'h9E37_79B9);

  // Right-justify the bytes an access uses, written out byte by byte.
  function automatic logic [31:0] pick(input logic [31:0] w, input logic [1:0] off,
                                       input logic [2:0] size);
    logic [31:0] r = '0;
    int nb = (size == 0) ? 1 : (size == 1) ? 2 : 4;
    int first = (int'(off) / nb) * nb;   // offset rounded down to the size
    for (int b = 0; b < nb; b++) r[8*b +: 8] = w[8*(first+b) +: 8];
    return r;
  endfunction

  typedef struct {
    logic [31:0] addr;
    logic        write;
    logic [2:0]  size;
    logic [31:0] wdata;
    logic        sel;
    logic [1:0]  trans;
    bit          valid;   // expected to be forwarded to the APB
    int          slave;
  } xfer_t;

  typedef struct {
    logic [31:0] addr;
    logic        write;
    logic [31:0] wdata;
    int          slave;
  } apb_exp_t;

  xfer_t    q[$];
  apb_exp_t exp_q[$];

  // mechanism counters
  int n_wr, n_rd, n_size[3], n_slave[NS], n_wait, n_err_addr, n_err_size, n_misalign;
  int n_err_2cyc, n_b2b, n_seq, n_readback, n_unsel, n_idle, n_mode[3];
  int dp_max = 0;

  // ------------------------------------------------------------ AHB master
  xfer_t ap, dp;
  bit    ap_active = 0, dp_active = 0;
  logic  dp_ours_q = 1'b0;
  int    dp_cycles = 0;
  int    mode = 0;
  bit    run = 0;

  assign hready_in = dp_ours_q ? hreadyout : 1'b1;

  task automatic complete(input xfer_t x);
    if (x.sel && x.trans[1]) begin
      if (x.valid) begin
        checks++;
        if (hresp !== 1'b0) begin
          failures++; $display("FAIL: HRESP not OKAY for %h", x.addr);
        end
        if (!x.write) begin
          logic [31:0] e = pick(ref_mem[x.slave][x.addr[7:2]], x.addr[1:0], x.size);
          checks++;
          if (hrdata !== e) begin
            failures++;
            $display("FAIL: read %h size %0d got %h exp %h", x.addr, x.size, hrdata, e);
          end
        end
        if (mode == 0) begin
          checks++;
          if (dp_cycles > MAX_DP_CYCLES) begin
            failures++; $display("FAIL: data phase took %0d cycles", dp_cycles);
          end
        end
        if (dp_cycles > dp_max) dp_max = dp_cycles;
      end else begin
        checks++;
        if (hresp !== 1'b1) begin
          failures++; $display("FAIL: no ERROR for invalid transfer %h size %0d", x.addr, x.size);
        end
      end
    end
  endtask

  always @(posedge hclk) if (run) begin
    if (hready_in) begin
      if (dp_active) complete(dp);
      if (dp_active && dp_ours_q && ap_active) n_b2b++;
      // address phase -> data phase
      if (ap_active) begin
        dp = ap; dp_active = 1;
        hwdata    <= ap.write ? ap.wdata : $urandom;
        dp_ours_q <= ap.sel && ap.trans[1];
        dp_cycles = 1;
        if (ap.sel && ap.valid) begin
          exp_q.push_back('{addr: ap.addr, write: ap.write,
                            wdata: pick(ap.wdata, ap.addr[1:0], ap.size), slave: ap.slave});
          if (ap.write)
            ref_mem[ap.slave][ap.addr[7:2]] = pick(ap.wdata, ap.addr[1:0], ap.size);
        end
      end else begin
        dp_active = 0;
        dp_ours_q <= 1'b0;
        hwdata    <= $urandom;
      end
      // next address phase
      if (q.size() > 0 && $urandom_range(0, 5) != 0) begin
        ap = q.pop_front(); ap_active = 1;
        hsel <= ap.sel; htrans <= ap.trans; haddr <= ap.addr;
        hwrite <= ap.write; hsize <= ap.size;
      end else begin
        ap_active = 0;
        hsel <= 1'($urandom_range(0, 1)); htrans <= 2'b00; haddr <= $urandom;
        hwrite <= 1'($urandom_range(0, 1)); hsize <= 3'($urandom_range(0, 2));
        n_idle++;
      end
    end else begin
      dp_cycles++;
      if (dp_ours_q && hresp === 1'b0) n_wait++;
      if (hresp === 1'b1) begin
        // first cycle of ERROR: HREADYOUT low; the second must follow
        checks++;
        n_err_2cyc++;
        if (!(dp_active && dp.sel && !dp.valid)) begin
          failures++; $display("FAIL: ERROR response for a valid transfer");
        end
      end
    end
  end

  // ----------------------------------------------------------- APB monitor
  apb_exp_t e_apb;
  always @(posedge pclk) if (presetn && penable && |psel) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected APB transfer to %h", paddr);
    end else begin
      e_apb = exp_q.pop_front();
      if (paddr !== e_apb.addr || pwrite !== e_apb.write || psel !== NS'(1 << e_apb.slave) ||
          (e_apb.write && pwdata !== e_apb.wdata)) begin
        failures++;
        $display("FAIL: APB %h w%0b sel%b data %h, exp %h w%0b slave %0d data %h",
                 paddr, pwrite, psel, pwdata, e_apb.addr, e_apb.write, e_apb.slave, e_apb.wdata);
      end
    end
  end

  // ----------------------------------------------------------- stimulus
  function automatic xfer_t valid_xfer(input int s, input int idx, input logic write,
                                       input logic [2:0] size, input logic [1:0] off);
    xfer_t x;
    x.slave = s; x.write = write; x.size = size; x.sel = 1'b1; x.trans = 2'b10;
    x.addr  = 32'h8000_0000 + (32'(s) << 26) + (32'(idx) << 2) + 32'(off);
    x.wdata = $urandom; x.valid = 1;
    return x;
  endfunction

  function automatic logic [1:0] aligned_off(input logic [2:0] size);
    logic [1:0] o = 2'($urandom_range(0, 3));
    if (size == 1) o[0] = 1'b0;
    if (size == 2) o = 2'b00;
    return o;
  endfunction

  task automatic gen(input int n);
    for (int k = 0; k < n; k++) begin
      int r = $urandom_range(0, 99);
      int s = $urandom_range(0, NS - 1);
      int idx = $urandom_range(0, 15);
      logic [2:0] size = 3'($urandom_range(0, 2));
      logic [1:0] off = aligned_off(size);
      xfer_t x;
      if (r < 8) begin                      // another slave's transfer
        x = valid_xfer(s, idx, 1'($urandom_range(0, 1)), size, off);
        x.sel = 1'b0; x.valid = 0; n_unsel++;
        q.push_back(x);
      end else if (r < 16) begin            // invalid transfer
        x = valid_xfer(s, idx, 1'($urandom_range(0, 1)), size, off);
        x.valid = 0;
        if ($urandom_range(0, 1) != 0) begin
          x.addr = ($urandom_range(0, 1) != 0 ? 32'h4000_0000 : 32'h8C00_0000) + 32'(idx << 2);
          n_err_addr++;
        end else begin
          x.size = 3'($urandom_range(3, 7));
          n_err_size++;
        end
        q.push_back(x);
      end else if (r < 20) begin            // misaligned halfword or word
        x = valid_xfer(s, idx, 1'($urandom_range(0, 1)), 3'($urandom_range(1, 2)),
                       2'($urandom_range(1, 3)));
        if (x.size == 1) x.addr[0] = 1'b1;
        n_misalign++;
        q.push_back(x);
      end else if (r < 26) begin            // INCR4 word burst
        logic w = 1'($urandom_range(0, 1));
        for (int b = 0; b < 4; b++) begin
          x = valid_xfer(s, (idx + b) % 64, w, 3'd2, 2'd0);
          x.trans = (b == 0) ? 2'b10 : 2'b11;
          if (b > 0) n_seq++;
          q.push_back(x);
        end
      end else if (r < 36) begin            // write then read back
        x = valid_xfer(s, idx, 1'b1, size, off);
        q.push_back(x);
        x = valid_xfer(s, idx, 1'b0, size, off);
        q.push_back(x);
        n_readback++;
      end else begin                        // single transfer
        q.push_back(valid_xfer(s, idx, 1'($urandom_range(0, 1)), size, off));
      end
    end
  endtask

  // count what reached the APB side
  always @(posedge pclk) if (presetn && penable && |psel) begin
    if (pwrite) n_wr++; else n_rd++;
    for (int s = 0; s < NS; s++) if (psel[s]) n_slave[s]++;
  end
  always @(posedge hclk) if (hsel && htrans[1] && hready_in && hsize <= 2 && run)
    n_size[hsize[1:0]]++;

  initial begin
    repeat (4) @(posedge hclk);
    hresetn = 1'b1; presetn = 1'b1;
    repeat (2) @(posedge hclk);
    run = 1;
    for (mode = 0; mode < 3; mode++) begin
      case (mode)
        0: pclk_half = 5;    // same frequency, phase shifted by 3 ns
        1: pclk_half = 11;   // slower APB clock
        default: pclk_half = 3;  // faster APB clock
      endcase
      gen(N_PER_MODE);
      wait (q.size() == 0 && !ap_active && !dp_active);
      repeat (40) @(posedge hclk);
      n_mode[mode]++;
    end
    run = 0;
    repeat (20) @(posedge hclk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL: %0d APB transfers missing", exp_q.size());
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (g_viol(s) != 0) begin
        failures++; $display("FAIL: APB protocol violations at peripheral %0d", s);
      end
    end
    // every AHB word in the reference matches what the peripherals hold
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (g_peek(s, i) !== ref_mem[s][i]) begin
          failures++; $display("FAIL: peripheral %0d word %0d differs", s, i);
        end
      end

    $display("mechanisms: wr=%0d rd=%0d size=%0d/%0d/%0d slave=%0d/%0d/%0d wait=%0d",
             n_wr, n_rd, n_size[0], n_size[1], n_size[2], n_slave[0], n_slave[1], n_slave[2], n_wait);
    $display("            err_addr=%0d err_size=%0d misalign=%0d err_resp=%0d b2b=%0d seq=%0d",
             n_err_addr, n_err_size, n_misalign, n_err_2cyc, n_b2b, n_seq);
    $display("            readback=%0d unsel=%0d idle=%0d modes=%0d/%0d/%0d dp_max=%0d",
             n_readback, n_unsel, n_idle, n_mode[0], n_mode[1], n_mode[2], dp_max);
    begin
      int m[];
      m = '{n_wr, n_rd, n_size[0], n_size[1], n_size[2], n_slave[0], n_slave[1],
           n_slave[2], n_wait, n_err_addr, n_err_size, n_misalign, n_err_2cyc,
           n_b2b, n_seq, n_readback, n_unsel, n_idle, n_mode[0], n_mode[1], n_mode[2]};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++; $display("FAIL: mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int g_viol(input int s);
    case (s)
      0: return g_slv[0].u_mem.n_violations;
      1: return g_slv[1].u_mem.n_violations;
      default: return g_slv[2].u_mem.n_violations;
    endcase
  endfunction

  function automatic logic [31:0] g_peek(input int s, input int i);
    case (s)
      0: return g_slv[0].u_mem.mem[i];
      1: return g_slv[1].u_mem.mem[i];
      default: return g_slv[2].u_mem.mem[i];
    endcase
  endfunction

  initial begin
    repeat (WD_CYCLES) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
