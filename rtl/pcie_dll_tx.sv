// pcie_dll_tx: transmit side of the data link layer.
//
// TLPs from the transaction layer are framed with a sequence-number DW in
// front and an LCRC (CRC-32 over sequence number and TLP) DW behind, and are
// stored in the replay buffer, a circular buffer of framed DWs. Transmission
// reads the replay buffer: a TLP leaves once it is completely stored, and
// stays in the buffer until an ACK DLLP covering its sequence number arrives.
// An arriving NAK acknowledges everything up to its sequence number and then
// rewinds the transmit pointer to the oldest unacknowledged TLP, so every TLP
// after it is sent again (replay).
//
// Two kinds of DLLP are generated: ACK/NAK, requested by the receive side for
// TLPs it got, and UpdateFC, requested by the transaction layer receive side.
// A DLLP is two DWs here: the 4 content bytes (type, then sequence number or
// header/data credits, as in PCIe) and a DW carrying the CRC-16. The output
// switches between DLLPs and TLPs only at packet boundaries; ACK/NAK goes
// first, then UpdateFC, then TLPs. out_dllp tells the physical layer which
// start symbol to use.
//
// Departures from PCIe that are this design's own: the sequence number takes
// a whole DW (PCIe uses 2 bytes) and the DLLP CRC a whole DW (PCIe: 2 bytes);
// there is no replay timer, so a lost TLP is only recovered by a NAK.
module pcie_dll_tx
  import pcie_pkg::*;
#(
  parameter int REPLAY_DEPTH    = 512,  // DW, power of two
  parameter int MAX_OUTSTANDING = 32,   // unacknowledged TLPs, power of two
  parameter int MAX_TLP_DW      = 72    // largest framed TLP, DW
) (
  input  logic        clk,
  input  logic        rst_n,
  // TLPs from the transaction layer
  input  beat_t       in,
  input  logic        in_valid,
  output logic        in_ready,
  // ACK/NAK to send, from the receive side
  input  logic        ackreq_valid,
  input  logic        ackreq_nak,
  input  logic [11:0] ackreq_seq,
  // UpdateFC to send, from the transaction layer receive side
  input  logic        fc_valid,
  input  fc_upd_t     fc,
  output logic        fc_ready,
  // ACK/NAK received from the link partner
  input  logic        rxack_valid,
  input  logic        rxack_nak,
  input  logic [11:0] rxack_seq,
  // to the physical layer
  output beat_t       out,
  output logic        out_dllp,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        replay_start,
  output logic [$clog2(MAX_OUTSTANDING):0] unacked
);
  localparam int AW = $clog2(REPLAY_DEPTH);
  localparam int TW = $clog2(MAX_OUTSTANDING);

  beat_t        rbuf [REPLAY_DEPTH];
  logic [AW:0]  wp, cp, tp, ap;
  logic [11:0]  next_seq;
  logic [31:0]  lcrc;

  // table of unacknowledged TLPs: sequence number and end pointer
  logic         t_push, t_pop, t_full, t_empty;
  logic [AW+12:0] t_rd;
  pcie_fifo #(.WIDTH(AW + 13), .DEPTH(MAX_OUTSTANDING)) u_tab (
    .clk, .rst_n, .push(t_push), .wr_data({next_seq, wp + 1'b1}), .pop(t_pop),
    .rd_data(t_rd), .full(t_full), .empty(t_empty), .count(unacked));

  // ------------------------------------------------------------- writer
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_LCRC} wst_e;
  wst_e        wst;
  logic        wr_en;
  beat_t       wr_beat;
  logic [AW:0] space;

  assign space = (AW+1)'(REPLAY_DEPTH) - (wp - ap);

  always_comb begin
    wr_en    = 1'b0;
    wr_beat  = '0;
    in_ready = 1'b0;
    t_push   = 1'b0;
    case (wst)
      W_IDLE: if (in_valid && in.sop && space >= (AW+1)'(MAX_TLP_DW) && !t_full) begin
        wr_en   = 1'b1;
        wr_beat = '{data: {20'h0, next_seq}, sop: 1'b1, eop: 1'b0};
      end
      W_DATA: begin
        in_ready = 1'b1;
        wr_en    = in_valid;
        wr_beat  = '{data: in.data, sop: 1'b0, eop: 1'b0};
      end
      default: begin
        wr_en   = 1'b1;
        wr_beat = '{data: lcrc, sop: 1'b0, eop: 1'b1};
        t_push  = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk) if (wr_en) rbuf[wp[AW-1:0]] <= wr_beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst      <= W_IDLE;
      wp       <= '0;
      cp       <= '0;
      next_seq <= '0;
      lcrc     <= CRC_INIT;
    end else begin
      if (wr_en) begin
        wp   <= wp + 1'b1;
        lcrc <= crc32_dw(wr_beat.sop ? CRC_INIT : lcrc, wr_beat.data);
      end
      case (wst)
        W_IDLE: if (wr_en) wst <= W_DATA;
        W_DATA: if (in_valid && in.eop) wst <= W_LCRC;
        default: begin
          wst      <= W_IDLE;
          cp       <= wp + 1'b1;
          next_seq <= next_seq + 12'd1;
        end
      endcase
    end
  end

  // ----------------------------------------------------- ACK/NAK receipt
  logic        purge_on;     // an ACK/NAK is being applied to the table
  logic [11:0] purge_seq;
  logic        replay_req;
  logic [11:0] head_seq;
  logic [AW:0] head_end;
  logic [11:0] seq_dist;

  assign {head_seq, head_end} = t_rd;
  assign seq_dist = purge_seq - head_seq;
  assign t_pop = purge_on && !t_empty && (seq_dist < 12'd2048);

  // ----------------------------------------------------------- transmit
  typedef enum logic [1:0] {T_IDLE, T_TLP, T_D0, T_D1} tst_e;
  tst_e        tst;
  logic [31:0] dllp;
  logic        ack_pend, nak_pend;
  logic [11:0] ack_seq;
  logic        fire;
  logic        pick_ack, pick_fc, pick_tlp, do_replay;

  always_comb begin
    pick_ack  = 1'b0;
    pick_fc   = 1'b0;
    pick_tlp  = 1'b0;
    do_replay = 1'b0;
    if (tst == T_IDLE) begin
      if (ack_pend || nak_pend) pick_ack = 1'b1;
      else if (fc_valid) pick_fc = 1'b1;
      else if (replay_req && !t_pop) do_replay = 1'b1;
      else if (tp != cp && !replay_req) pick_tlp = 1'b1;
    end
  end
  assign fc_ready     = pick_fc;
  assign replay_start = do_replay;

  always_comb begin
    out       = '0;
    out_dllp  = 1'b0;
    out_valid = 1'b0;
    case (tst)
      T_TLP: begin
        out       = rbuf[tp[AW-1:0]];
        out_valid = 1'b1;
      end
      T_D0: begin
        out       = '{data: dllp, sop: 1'b1, eop: 1'b0};
        out_dllp  = 1'b1;
        out_valid = 1'b1;
      end
      T_D1: begin
        out       = '{data: {16'h0, crc16_dw(dllp)}, sop: 1'b0, eop: 1'b1};
        out_dllp  = 1'b1;
        out_valid = 1'b1;
      end
      default: ;
    endcase
  end
  assign fire = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst        <= T_IDLE;
      tp         <= '0;
      ap         <= '0;
      dllp       <= '0;
      ack_pend   <= 1'b0;
      nak_pend   <= 1'b0;
      ack_seq    <= '0;
      purge_on   <= 1'b0;
      purge_seq  <= '0;
      replay_req <= 1'b0;
    end else begin
      // ACK/NAK to send (a newer request replaces an older one)
      if (pick_ack) begin
        ack_pend <= 1'b0;
        nak_pend <= 1'b0;
      end
      if (ackreq_valid) begin
        ack_seq <= ackreq_seq;
        if (ackreq_nak) begin nak_pend <= 1'b1; ack_pend <= 1'b0; end
        else begin ack_pend <= 1'b1; nak_pend <= 1'b0; end
      end
      // ACK/NAK received
      if (rxack_valid) begin
        purge_on  <= 1'b1;
        purge_seq <= rxack_seq;
        if (rxack_nak) replay_req <= 1'b1;
      end else if (purge_on && !t_pop) begin
        purge_on <= 1'b0;
      end
      if (t_pop) ap <= head_end;
      // transmitter
      case (tst)
        T_IDLE: begin
          if (pick_ack) begin
            dllp <= {nak_pend ? DLLP_NAK : DLLP_ACK, 12'h0, ack_seq};
            tst  <= T_D0;
          end else if (pick_fc) begin
            dllp <= {DLLP_UPDFC_P + {2'b00, fc.cls, 1'b0, fc.vc}, 2'b00, fc.hdr, 2'b00, fc.data};
            tst  <= T_D0;
          end else if (do_replay) begin
            tp         <= ap;
            replay_req <= rxack_valid && rxack_nak;
          end else if (pick_tlp) begin
            tst <= T_TLP;
          end
        end
        T_TLP: if (fire) begin
          tp <= tp + 1'b1;
          if (out.eop) tst <= T_IDLE;
        end
        T_D0: if (fire) tst <= T_D1;
        default: if (fire) tst <= T_IDLE;
      endcase
    end
  end
endmodule
