// pcie_rc_dma: DMA node of the root complex.
//
// Serves memory reads and writes that the endpoint sends as TLPs, by
// accessing system memory on the endpoint's behalf. The header of an
// incoming MRd or MWr selects the reader or the writer control:
//
//   writer (MemWriter): each payload DW of an MWr becomes one PutFullData of
//     4 bytes at the next address, issued as the payload streams in; the
//     writer then waits for all AccessAcks before taking the next TLP, so a
//     later read cannot overtake the write.
//   reader (MemLoader): an MRd of len DW becomes len Gets of 4 bytes, each
//     tagged with its word index as bus source ID. The memory may answer out
//     of order; the reorder helper files each AccessAckData into a reorder
//     buffer slot by source ID and streams the CplD (3-DW header, then the
//     data words in request order) as soon as the next word is present.
//
// The document chunks DMA requests into TileLink transfers and reorders the
// responses; the 4-byte chunk, the one-request-at-a-time control and the
// MAX_READ_DW limit (a read longer than the limit is cut to it) are this
// design's own choices. Completions carry successful status and the
// requester ID and tag of the MRd.
module pcie_rc_dma
  import pcie_pkg::*;
#(
  parameter int          MAX_READ_DW = 64,       // 256-byte maximum payload
  parameter logic [15:0] CPL_ID      = 16'h0000
) (
  input  logic   clk,
  input  logic   rst_n,
  // MRd / MWr TLPs from the endpoint
  input  beat_t  rx,
  input  logic   rx_valid,
  output logic   rx_ready,
  // completions to the endpoint
  output beat_t  tx,
  output logic   tx_valid,
  input  logic   tx_ready,
  // system bus client port (to memory)
  output tl_a_t  mem_a,
  output logic   mem_a_valid,
  input  logic   mem_a_ready,
  input  tl_d_t  mem_d,
  input  logic   mem_d_valid,
  output logic   mem_d_ready,
  output logic   reorder_event   // a read response arrived out of order
);
  localparam int IW = $clog2(MAX_READ_DW);

  typedef enum logic [2:0] {S_HDR, S_WDATA, S_WWAIT, S_RISSUE, S_RCPL} state_e;
  state_e      st;
  logic [31:0] h0, h1, h2;
  logic [1:0]  hidx;
  logic [10:0] len, cnt, out_idx;
  logic [31:0] addr;
  logic [15:0] acks_due;

  logic [31:0]            rob   [MAX_READ_DW];
  logic [MAX_READ_DW-1:0] rob_v;
  logic [IW:0]            next_resp;   // read responses received so far

  assign mem_d_ready = 1'b1;

  // ------------------------------------------------ header / writer input
  always_comb begin
    rx_ready    = 1'b0;
    mem_a       = '0;
    mem_a_valid = 1'b0;
    case (st)
      S_HDR:   rx_ready = 1'b1;
      S_WDATA: begin
        mem_a_valid    = rx_valid;
        mem_a.opcode   = TL_PUT;
        mem_a.size     = 3'd2;
        mem_a.address  = addr;
        mem_a.mask     = 4'hF;
        mem_a.data     = rx.data;
        mem_a.source   = 8'h80;
        rx_ready       = mem_a_ready;
      end
      S_RISSUE: begin
        mem_a_valid    = 1'b1;
        mem_a.opcode   = TL_GET;
        mem_a.size     = 3'd2;
        mem_a.address  = addr;
        mem_a.mask     = 4'hF;
        mem_a.source   = 8'(cnt);
      end
      default: ;
    endcase
  end

  // ------------------------------------------------ completion output
  always_comb begin
    tx       = '0;
    tx_valid = 1'b0;
    if (st == S_RCPL) begin
      case (out_idx)
        11'd0: tx.data = mk_dw0(FT_CPLD, h0[22:20], 1'b0, 10'(len));
        11'd1: tx.data = {CPL_ID, 3'b000, 1'b0, 12'(len << 2)};
        11'd2: tx.data = {h1[31:16], h1[15:8], 1'b0, h2[6:0]};
        default: tx.data = rob[IW'(out_idx - 11'd3)];
      endcase
      tx.sop   = (out_idx == 11'd0);
      tx.eop   = (out_idx == len + 11'd2);
      tx_valid = (out_idx < 11'd3) || rob_v[IW'(out_idx - 11'd3)];
    end
  end

  assign reorder_event = mem_d_valid && mem_d.opcode == TL_ACKD &&
                         ({1'b0, mem_d.source[IW-1:0]} != next_resp);

  always_ff @(posedge clk) begin
    if (mem_d_valid && mem_d.opcode == TL_ACKD) rob[mem_d.source[IW-1:0]] <= mem_d.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_HDR;
      h0        <= '0; h1 <= '0; h2 <= '0;
      hidx      <= '0;
      len       <= '0;
      cnt       <= '0;
      out_idx   <= '0;
      addr      <= '0;
      acks_due  <= '0;
      rob_v     <= '0;
      next_resp <= '0;
    end else begin
      // responses from memory
      if (mem_d_valid) begin
        if (mem_d.opcode == TL_ACKD) begin
          rob_v[mem_d.source[IW-1:0]] <= 1'b1;
          next_resp <= next_resp + 1'b1;
        end
      end
      acks_due <= acks_due + 16'(mem_a_valid && mem_a_ready && st == S_WDATA)
                           - 16'(mem_d_valid && mem_d.opcode == TL_ACK);
      case (st)
        S_HDR: if (rx_valid) begin
          hidx <= rx.eop ? 2'd0 : (rx.sop ? 2'd0 : hidx) + 2'd1;
          case (rx.sop ? 2'd0 : hidx)
            2'd0: h0 <= rx.data;
            2'd1: h1 <= rx.data;
            default: begin
              h2   <= rx.data;
              addr <= {rx.data[31:2], 2'b00};
              cnt  <= '0;
              if (tlp_ft(h0) == FT_MWR && !rx.eop) begin
                st <= S_WDATA;
              end else if (tlp_ft(h0) == FT_MRD) begin
                len       <= (tlp_len({h0[31:31], 1'b1, h0[29:0]}) > 11'(MAX_READ_DW)) ?
                             11'(MAX_READ_DW) : tlp_len({h0[31:31], 1'b1, h0[29:0]});
                rob_v     <= '0;
                next_resp <= '0;
                st        <= S_RISSUE;
              end
            end
          endcase
        end
        S_WDATA: if (rx_valid && rx_ready) begin
          addr <= addr + 32'd4;
          if (rx.eop) st <= S_WWAIT;
        end
        S_WWAIT: if (acks_due == 16'd0) st <= S_HDR;
        S_RISSUE: if (mem_a_ready) begin
          addr <= addr + 32'd4;
          cnt  <= cnt + 11'd1;
          if (cnt + 11'd1 == len) begin
            st      <= S_RCPL;
            out_idx <= '0;
          end
        end
        default: if (tx_valid && tx_ready) begin
          out_idx <= out_idx + 11'd1;
          if (tx.eop) st <= S_HDR;
        end
      endcase
    end
  end
endmodule
