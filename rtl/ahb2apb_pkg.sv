// ahb2apb_pkg -- types, constants and helper functions shared by the blocks of
// the AHB-to-APB bridge.
//
// The bridge moves one AHB transfer at a time onto an APB bus that runs on its
// own clock. The AHB side (ahb_response, control_transfer) and the APB side
// (apb_access) exchange a latched request (apb_req_t) and a four-phase
// PENDWR/PENDRD -> PDONE handshake. This package holds the request record, the
// AHB encodings and the address map used both to validate a transfer on the
// AHB side and to select a peripheral on the APB side.
//
// Address map (this design's choice; the peripheral count and region size are
// parameters of the modules that call decode_slave): peripheral i answers
// BASE + i*REGION .. BASE + (i+1)*REGION - 1 with BASE = 32'h8000_0000 and
// REGION = 64 MiB, so 0x8186_D230 selects peripheral 0 (PSEL = 3'b001) and
// 0x84EB_9E8C selects peripheral 1 (PSEL = 3'b010).
package ahb2apb_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  // HTRANS encodings (AMBA AHB)
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // HSIZE encodings that fit a 32-bit bus; larger sizes are invalid here
  localparam logic [2:0] HSIZE_BYTE = 3'b000;
  localparam logic [2:0] HSIZE_HALF = 3'b001;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  // HRESP (single-bit form)
  localparam logic HRESP_OKAY  = 1'b0;
  localparam logic HRESP_ERROR = 1'b1;

  // Address map
  localparam logic [ADDR_W-1:0] MAP_BASE         = 32'h8000_0000;
  localparam int unsigned       MAP_REGION_BITS  = 26;  // 64 MiB per peripheral

  // One request as handed from the AHB clock domain to the APB clock domain.
  // Every field is held stable while PENDWR/PENDRD is high.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;   // byte address, passed unchanged to PADDR
    logic              write;  // 1: write, 0: read
    logic [2:0]        size;   // HSIZE of the transfer
    logic [DATA_W-1:0] wdata;  // active write lanes, right-justified
  } apb_req_t;

  // Index of the peripheral an address falls in, or -1 if none.
  function automatic int decode_slave(input logic [ADDR_W-1:0] addr,
                                      input int unsigned       num_slaves);
    logic [ADDR_W-1:0] offset;
    offset = addr - MAP_BASE;
    if (addr < MAP_BASE) return -1;
    if ((offset >> MAP_REGION_BITS) >= num_slaves) return -1;
    return int'(offset >> MAP_REGION_BITS);
  endfunction

  // Mask of the low bytes an HSIZE transfer occupies once right-justified.
  function automatic logic [DATA_W-1:0] size_mask(input logic [2:0] size);
    unique case (size)
      HSIZE_BYTE: return 32'h0000_00FF;
      HSIZE_HALF: return 32'h0000_FFFF;
      default:    return 32'hFFFF_FFFF;
    endcase
  endfunction

  // Byte offset of the first lane an access uses: the address offset rounded
  // down to the transfer size (a word access always starts at lane 0).
  function automatic logic [1:0] lane_offset(input logic [1:0] byte_off,
                                             input logic [2:0] size);
    unique case (size)
      HSIZE_BYTE: return byte_off;
      HSIZE_HALF: return {byte_off[1], 1'b0};
      default:    return 2'b00;
    endcase
  endfunction

  // Take the byte lanes an access of the given size and address uses out of a
  // lane-positioned 32-bit word and right-justify them, zero-extended.
  function automatic logic [DATA_W-1:0] lanes_to_low(input logic [DATA_W-1:0] word,
                                                     input logic [1:0]        byte_off,
                                                     input logic [2:0]        size);
    return (word >> (8 * lane_offset(byte_off, size))) & size_mask(size);
  endfunction

endpackage
