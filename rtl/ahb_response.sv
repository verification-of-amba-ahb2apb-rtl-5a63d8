// ahb_response -- AHB slave interface of the bridge (AHB clock domain).
//
// Sequences how the bridge answers the AHB. A transfer is taken when HSEL,
// HREADY (the bus-wide ready, hready_in) and HTRANS = NONSEQ or SEQ are all
// high. It is then checked: the address must fall in a peripheral's region
// and HSIZE must be byte, halfword or word (misaligned addresses are
// accepted). A valid transfer is forwarded (load) to control_transfer; an
// invalid one is not forwarded and is answered with the two-cycle AHB ERROR response
// (HRESP high with HREADYOUT low, then HRESP high with HREADYOUT high).
//
// For a valid transfer HREADYOUT is held low (wait states) through the data
// phase. Once control_transfer holds the complete request and the APB side has
// dropped PDONE from the previous transfer, PENDWR (write) or PENDRD (read) is
// raised. When the synchronised PDONE goes high the request line is dropped,
// the read data is registered onto HRDATA and HREADYOUT goes high for the
// last cycle of the data phase. This is a four-phase request/acknowledge
// handshake: PENDWR/PENDRD up, PDONE up, PENDWR/PENDRD down, PDONE down; the
// next request waits for the last step, so the two clocks may be unrelated.
//
// The block's role, the PENDWR/PENDRD/PDONE names and the error for invalid
// commands follow the bridge's description; the state machine, the validity
// rules and the synchroniser depth are this design's choices.
//
// Timing, equal clocks: a read's data phase lasts 10 HCLK cycles and a
// write's 11 when the handshake is idle; a transfer that follows directly
// takes 14, as it first waits for the previous PDONE to fall. Reset is active
// low and asynchronous. Only HTRANS[1] is looked at (NONSEQ and SEQ are
// handled alike, IDLE and BUSY ignored), so lint reports HTRANS[0] unused.
module ahb_response
  import ahb2apb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES  = 3,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB slave port
  input  logic              hsel,
  input  logic [1:0]        htrans,
  input  logic [ADDR_W-1:0] haddr,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic              hready_in,
  output logic              hreadyout,
  output logic              hresp,
  output logic [DATA_W-1:0] hrdata,
  // to / from control_transfer
  output logic              load,
  output logic              release_req,
  input  logic              req_ready,
  input  logic [DATA_W-1:0] rdata_fmt,
  // handshake with the APB side
  output logic              pendwr,
  output logic              pendrd,
  input  logic              pdone      // from the PCLK domain, unsynchronised
);

  typedef enum logic [2:0] {AR_IDLE, AR_ISSUE, AR_WAIT, AR_ERR1, AR_ERR2} ar_state_e;
  ar_state_e state;

  logic pdone_s;
  logic write_q;
  logic accept, valid;

  sync_2ff #(.STAGES(SYNC_STAGES)) u_sync_pdone (
    .clk(hclk), .rst_n(hresetn), .d(pdone), .q(pdone_s));

  // Validity of the transfer in its address phase. A misaligned address is
  // not an error: the lanes are picked from the address rounded down to the
  // transfer size, and PADDR carries the address unchanged.
  assign valid = (hsize <= HSIZE_WORD) && (decode_slave(haddr, NUM_SLAVES) >= 0);

  // The address phase is sampled whenever this slave is not stalling
  assign hreadyout = (state == AR_IDLE) || (state == AR_ERR2);
  assign hresp     = ((state == AR_ERR1) || (state == AR_ERR2)) ? HRESP_ERROR : HRESP_OKAY;
  assign accept    = hreadyout && hsel && hready_in && htrans[1];
  assign load      = accept && valid;
  // control_transfer empties on the same edge this block returns to idle, so
  // the very next address phase can be loaded.
  assign release_req = (state == AR_WAIT) && pdone_s;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state       <= AR_IDLE;
      write_q     <= 1'b0;
      pendwr      <= 1'b0;
      pendrd      <= 1'b0;
      hrdata      <= '0;
    end else begin
      unique case (state)
        AR_IDLE, AR_ERR2: begin
          if (accept) begin
            state   <= valid ? AR_ISSUE : AR_ERR1;
            write_q <= hwrite;
          end else begin
            state <= AR_IDLE;
          end
        end
        AR_ISSUE: if (req_ready && !pdone_s) begin
          pendwr <= write_q;
          pendrd <= !write_q;
          state  <= AR_WAIT;
        end
        AR_WAIT: if (pdone_s) begin
          pendwr      <= 1'b0;
          pendrd      <= 1'b0;
          if (!write_q) hrdata <= rdata_fmt;
          state       <= AR_IDLE;
        end
        AR_ERR1: state <= AR_ERR2;
        default: state <= AR_IDLE;
      endcase
    end
  end

  // Handshake rules: never both request lines, and a request is only raised
  // after the previous acknowledge has gone.
  a_one_pend: assert property (@(posedge hclk) disable iff (!hresetn)
                               !(pendwr && pendrd))
    else $error("ahb_response: PENDWR and PENDRD both high");
  a_pend_after_ack_low: assert property (@(posedge hclk) disable iff (!hresetn)
                                         $rose(pendwr || pendrd) |-> $past(!pdone_s))
    else $error("ahb_response: request raised while PDONE still high");
  a_error_two_cycles: assert property (@(posedge hclk) disable iff (!hresetn)
                                       (state == AR_ERR1) |=> (hresp && hreadyout))
    else $error("ahb_response: ERROR response not two cycles");

endmodule
