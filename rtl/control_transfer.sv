// control_transfer -- holding register between the pipelined AHB bus and the
// APB side of the bridge (AHB clock domain).
//
// AHB is pipelined: a transfer's address and control arrive in one cycle and
// its write data in the next. APB wants address, control and data together
// and stable for its whole two-cycle transfer. This block latches the control
// of an accepted transfer (load), waits one cycle for the write data of a
// write, and then presents the complete request (req) with req_ready high
// until ahb_response signals that the APB side has finished it (release).
// While it holds a request it ignores further loads, so only one request is
// ever presented to the APB side.
//
// Data lanes: the write data is stored right-justified -- the byte lanes the
// transfer uses, selected by address bits [1:0] and HSIZE, are shifted down
// to bit 0 and the rest is zero (a halfword write of 32'hAC46_BA74 to an
// address ending in 0 gives PWDATA 32'h0000_BA74; to one ending in 2 it would
// give 32'h0000_AC46). Read data coming back from the APB side is treated the
// same way to form rdata_fmt for HRDATA. This lane handling follows the
// transfers the bridge was characterised with; the state machine itself is
// this design's own.
//
// Timing: load in cycle t (address phase) -> for a read req_ready from t+1;
// for a write the data is captured at the end of t+1 and req_ready is high
// from t+2. Reset is active low and asynchronous.
module control_transfer
  import ahb2apb_pkg::*;
(
  input  logic              hclk,
  input  logic              hresetn,
  // from ahb_response
  input  logic              load,       // valid transfer accepted this cycle
  input  logic [ADDR_W-1:0] haddr,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [DATA_W-1:0] hwdata,     // sampled the cycle after load
  input  logic              release_req,// APB side finished the held request
  // to the APB side
  output apb_req_t          req,
  output logic              req_ready,  // req is complete and stable
  output logic              busy,       // a request is held
  // read data from the APB side, and its AHB form
  input  logic [DATA_W-1:0] apb_rdata,
  output logic [DATA_W-1:0] rdata_fmt
);

  typedef enum logic [1:0] {CT_EMPTY, CT_WAIT_WDATA, CT_HELD} ct_state_e;
  ct_state_e state;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state <= CT_EMPTY;
      req   <= '0;
    end else begin
      unique case (state)
        CT_EMPTY: if (load) begin
          req.addr  <= haddr;
          req.write <= hwrite;
          req.size  <= hsize;
          state     <= hwrite ? CT_WAIT_WDATA : CT_HELD;
        end
        CT_WAIT_WDATA: begin
          req.wdata <= lanes_to_low(hwdata, req.addr[1:0], req.size);
          state     <= CT_HELD;
        end
        CT_HELD: if (release_req) state <= CT_EMPTY;
        default: state <= CT_EMPTY;
      endcase
    end
  end

  assign req_ready = (state == CT_HELD);
  assign busy      = (state != CT_EMPTY);
  assign rdata_fmt = lanes_to_low(apb_rdata, req.addr[1:0], req.size);

  // A new transfer must never be offered while one is held.
  a_one_request: assert property (@(posedge hclk) disable iff (!hresetn)
                                  load |-> !busy)
    else $error("control_transfer: load while a request is held");

endmodule
