// pcie_pkg: types, encodings and helper functions shared by the PCIe model.
//
// The model moves packets between its layers as streams of 32-bit double
// words (DW), one per clock, with sop/eop marking the first and last DW and a
// valid/ready handshake. TLP headers use the real PCIe 3-DW layouts for memory,
// configuration and completion requests. DLLP type codes and the framing
// symbols (STP, SDP, END, PAD) follow the PCIe 8b/10b encodings. The system
// bus is a 32-bit, TileLink-like request (A) / response (D) channel pair:
// single-beat requests, and multi-beat responses for a Get of more than 4
// bytes; the beat format is this design's own simplification.
package pcie_pkg;

  // ---------------------------------------------------------------- streams
  typedef struct packed {
    logic [31:0] data;
    logic        sop;
    logic        eop;
  } beat_t;

  // ------------------------------------------------------------------ TLPs
  // {fmt[2:0], type[4:0]} of the 3-DW header
  localparam logic [7:0] FT_MRD  = 8'b000_00000;
  localparam logic [7:0] FT_MWR  = 8'b010_00000;
  localparam logic [7:0] FT_CFGRD = 8'b000_00100;
  localparam logic [7:0] FT_CFGWR = 8'b010_00100;
  localparam logic [7:0] FT_CPL  = 8'b000_01010;
  localparam logic [7:0] FT_CPLD = 8'b010_01010;

  // flow-control classes
  typedef enum logic [1:0] {FC_P = 2'd0, FC_NP = 2'd1, FC_CPL = 2'd2} fc_class_e;

  localparam int HDR_DW = 3;

  function automatic logic [7:0] tlp_ft(input logic [31:0] dw0);
    return dw0[31:24];
  endfunction

  function automatic logic tlp_has_data(input logic [31:0] dw0);
    return dw0[30];
  endfunction

  // payload length in DW (0 for TLPs without data; length field 0 = 1024)
  function automatic logic [10:0] tlp_len(input logic [31:0] dw0);
    if (!dw0[30]) return 11'd0;
    return (dw0[9:0] == 10'd0) ? 11'd1024 : {1'b0, dw0[9:0]};
  endfunction

  function automatic fc_class_e tlp_class(input logic [31:0] dw0);
    case (dw0[31:24])
      FT_MWR:         return FC_P;
      FT_CPL, FT_CPLD: return FC_CPL;
      default:        return FC_NP;
    endcase
  endfunction

  // data credits (16-byte units) needed by a payload of len DW
  function automatic logic [11:0] data_credits(input logic [10:0] len);
    return 12'((len + 11'd3) >> 2);
  endfunction

  // header DW0: fmt/type, traffic class, TD (digest present), length
  function automatic logic [31:0] mk_dw0(input logic [7:0] ft, input logic [2:0] tc,
                                         input logic td, input logic [9:0] len);
    return {ft, 1'b0, tc, 4'b0, td, 1'b0, 2'b00, 2'b00, len};
  endfunction

  // ----------------------------------------------------------------- DLLPs
  localparam logic [7:0] DLLP_ACK = 8'h00;
  localparam logic [7:0] DLLP_NAK = 8'h10;
  localparam logic [7:0] DLLP_UPDFC_P = 8'h80;   // | VC
  localparam logic [7:0] DLLP_UPDFC_NP = 8'h90;
  localparam logic [7:0] DLLP_UPDFC_CPL = 8'hA0;

  // flow-control update carried between layers
  typedef struct packed {
    logic [2:0]  vc;
    fc_class_e   cls;
    logic [7:0]  hdr;    // header credit limit
    logic [11:0] data;   // data credit limit
  } fc_upd_t;

  // ------------------------------------------------------ framing symbols
  typedef struct packed {
    logic       k;       // control symbol
    logic [7:0] b;
  } sym_t;

  localparam logic [7:0] K_STP = 8'hFB;  // K27.7 start of TLP
  localparam logic [7:0] K_SDP = 8'h5C;  // K28.2 start of DLLP
  localparam logic [7:0] K_END = 8'hFD;  // K29.7 end
  localparam logic [7:0] K_PAD = 8'hF7;  // K23.7 pad

  // -------------------------------------------------------------- CRCs
  // LCRC / ECRC: CRC-32 (poly 04C11DB7), one DW per call, MSB first.
  function automatic logic [31:0] crc32_dw(input logic [31:0] crc, input logic [31:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      c = (c[31] ^ d[i]) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    end
    return c;
  endfunction

  // DLLP CRC: CRC-16 (poly 100B) over the 4 DLLP content bytes.
  function automatic logic [15:0] crc16_dw(input logic [31:0] d);
    logic [15:0] c;
    c = 16'hFFFF;
    for (int i = 31; i >= 0; i--) begin
      c = (c[15] ^ d[i]) ? ((c << 1) ^ 16'h100B) : (c << 1);
    end
    return c;
  endfunction

  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  // ---------------------------------------------------------- system bus
  localparam logic [2:0] TL_PUT = 3'd0;   // PutFullData
  localparam logic [2:0] TL_GET = 3'd4;   // Get
  localparam logic [2:0] TL_ACK = 3'd0;   // AccessAck
  localparam logic [2:0] TL_ACKD = 3'd1;  // AccessAckData

  typedef struct packed {
    logic [2:0]  opcode;
    logic [2:0]  size;       // log2 of the transfer size in bytes
    logic [31:0] address;
    logic [3:0]  mask;
    logic [31:0] data;
    logic [7:0]  source;
  } tl_a_t;

  typedef struct packed {
    logic [2:0]  opcode;
    logic [31:0] data;
    logic [7:0]  source;
    logic        error;
  } tl_d_t;

endpackage
