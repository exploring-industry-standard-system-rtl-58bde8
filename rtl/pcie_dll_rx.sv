// pcie_dll_rx: receive side of the data link layer.
//
// TLPs arrive from the physical layer as sequence-number DW, TLP DWs and LCRC
// DW. The TLP DWs are written into a commit buffer while the LCRC is
// recomputed; each DW is held back one beat so that the last TLP DW can be
// marked eop when the LCRC DW arrives. A TLP whose LCRC matches and whose
// sequence number is the expected one is published to the transaction layer
// and an ACK for it is requested from the transmit side. A duplicate (an older
// sequence number, as seen during a replay) is dropped and acknowledged
// again; a TLP with a bad LCRC or a sequence number from the future is dropped
// and a NAK is requested, naming the last good sequence number.
//
// DLLPs (content DW plus CRC DW) are checked against their CRC-16 and decoded
// here, which is the "check if FC packet" step: ACK/NAK go to the local
// transmit side (to purge or replay its buffer) and UpdateFC goes to the
// transaction layer's TX credit counters. A DLLP with a bad CRC is dropped.
//
// The input cannot be stalled (the link keeps delivering); the output to the
// transaction layer is a TLP stream, one DW per cycle, that the transaction
// layer always accepts.
//
// Timing: one DW per cycle; a TLP is released upward only after its LCRC DW
// has been checked, so it is delayed by its own length. Origin: ACK/NAK,
// sequence check and the two DLLP kinds (acknowledge, flow control) follow
// the reference; the full-DW sequence and CRC fields are this design's.
module pcie_dll_rx
  import pcie_pkg::*;
#(
  parameter int RX_DEPTH = 128   // DW of the TLP commit buffer, power of two
) (
  input  logic        clk,
  input  logic        rst_n,
  input  beat_t       in,
  input  logic        in_dllp,
  input  logic        in_valid,
  // good TLPs to the transaction layer
  output beat_t       out,
  output logic        out_valid,
  // ACK/NAK for the local transmit side to send
  output logic        ackreq_valid,
  output logic        ackreq_nak,
  output logic [11:0] ackreq_seq,
  // ACK/NAK received from the link partner
  output logic        rxack_valid,
  output logic        rxack_nak,
  output logic [11:0] rxack_seq,
  // UpdateFC received
  output logic        fc_valid,
  output fc_upd_t     fc,
  // error pulses
  output logic        lcrc_err,
  output logic        dllp_err
);
  localparam int AW = $clog2(RX_DEPTH);

  logic        push, commit, rewind, empty;
  beat_t       wr_beat;
  logic [AW:0] free;

  pcie_commit_fifo #(.WIDTH($bits(beat_t)), .DEPTH(RX_DEPTH)) u_store (
    .clk, .rst_n, .push, .wr_data(wr_beat), .commit, .rewind, .pop(!empty),
    .rd_data(out), .empty, .free);
  assign out_valid = !empty;

  logic [11:0] exp_seq, rx_seq;
  logic [31:0] crc;
  beat_t       held;
  logic        have, first;
  logic [31:0] dcontent;

  logic tlp_beat, tlp_end, crc_ok, seq_ok, seq_old;
  assign tlp_beat = in_valid && !in_dllp;
  assign tlp_end  = tlp_beat && in.eop;
  assign crc_ok   = (crc == in.data);
  assign seq_ok   = (rx_seq == exp_seq);
  assign seq_old  = !seq_ok && ((exp_seq - rx_seq) <= 12'd2048);

  always_comb begin
    push    = tlp_beat && !in.sop && have;
    wr_beat = '{data: held.data, sop: held.sop, eop: in.eop};
    commit  = tlp_end && crc_ok && seq_ok;
    rewind  = tlp_end && !(crc_ok && seq_ok);
  end

  always_comb begin
    ackreq_valid = tlp_end;
    ackreq_nak   = !(crc_ok && (seq_ok || seq_old));
    ackreq_seq   = (crc_ok && seq_ok) ? rx_seq : exp_seq - 12'd1;
  end
  assign lcrc_err = tlp_end && !crc_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_seq  <= '0;
      rx_seq   <= '0;
      crc      <= CRC_INIT;
      held     <= '0;
      have     <= 1'b0;
      first    <= 1'b0;
      dcontent <= '0;
    end else begin
      if (tlp_beat) begin
        if (in.sop) begin
          rx_seq <= in.data[11:0];
          crc    <= crc32_dw(CRC_INIT, in.data);
          have   <= 1'b0;
          first  <= 1'b1;
        end else if (!in.eop) begin
          crc   <= crc32_dw(crc, in.data);
          held  <= '{data: in.data, sop: first, eop: 1'b0};
          have  <= 1'b1;
          first <= 1'b0;
        end else begin
          have <= 1'b0;
          if (crc_ok && seq_ok) exp_seq <= exp_seq + 12'd1;
        end
      end
      if (in_valid && in_dllp && in.sop) dcontent <= in.data;
    end
  end

  // ---------------------------------------------------------------- DLLPs
  logic dllp_end, dllp_ok;
  logic [7:0] dtype;
  assign dllp_end = in_valid && in_dllp && in.eop;
  assign dllp_ok  = (in.data[15:0] == crc16_dw(dcontent));
  assign dtype    = dcontent[31:24];
  assign dllp_err = dllp_end && !dllp_ok;

  always_comb begin
    rxack_valid = dllp_end && dllp_ok && (dtype == DLLP_ACK || dtype == DLLP_NAK);
    rxack_nak   = (dtype == DLLP_NAK);
    rxack_seq   = dcontent[11:0];
    fc_valid    = dllp_end && dllp_ok && (dtype[7:6] == 2'b10) && (dtype[5:4] != 2'b11);
    fc.vc       = dtype[2:0];
    fc.cls      = fc_class_e'(dtype[5:4]);
    fc.hdr      = dcontent[21:14];
    fc.data     = dcontent[11:0];
  end

  // assertions, checked only out of reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else assert (!(push && free == '0)) else $error("dll_rx: store buffer overflow");
  end
endmodule
