// apb_slave_mem -- behavioural model of one APB peripheral, for testbenches.
//
// A word memory of DEPTH entries indexed by PADDR[log2(DEPTH)+1:2]. An APB
// write stores PWDATA whole; a read returns the stored word on PRDATA (zero
// while the peripheral is not selected, so a testbench can OR the PRDATA of
// several models). Entry i starts as INIT_SEED ^ (i * 32'h9E37_79B9) so that
// reads before any write give known values. The model checks the APB rules
// it sees: SETUP lasts one cycle and is followed by ACCESS, ACCESS lasts one
// cycle, and address, direction and data do not change between them. It
// counts its writes, reads and rule violations.
module apb_slave_mem #(
  parameter int unsigned DEPTH     = 64,
  parameter logic [31:0] INIT_SEED = 32'h1215_3524
) (
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic [31:0] paddr,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata
);

  localparam int unsigned IW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  int unsigned n_writes = 0, n_reads = 0, n_violations = 0;

  logic        in_setup_q;
  logic [31:0] paddr_q, pwdata_q;
  logic        pwrite_q;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = INIT_SEED ^ (i * 32'h9E37_79B9);

  assign prdata = psel ? mem[paddr[IW+1:2]] : 32'h0;

  always @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      in_setup_q <= 1'b0;
    end else begin
      if (in_setup_q && !(psel && penable)) n_violations++;
      if (psel && penable && !in_setup_q) n_violations++;
      if (in_setup_q && (paddr != paddr_q || pwrite != pwrite_q || pwdata != pwdata_q))
        n_violations++;
      if (psel && penable) begin
        if (pwrite) begin
          mem[paddr[IW+1:2]] <= pwdata;
          n_writes++;
        end else begin
          n_reads++;
        end
      end
      in_setup_q <= psel && !penable;
      paddr_q    <= paddr;
      pwdata_q   <= pwdata;
      pwrite_q   <= pwrite;
    end
  end

endmodule
