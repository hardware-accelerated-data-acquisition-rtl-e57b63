// dma_reader: DMA core that reads one packet from DRAM and streams it out.
//
// Given a descriptor (start address, length in bytes) it reads the packet
// over an AXI3 read channel (the S-GP port of the processing system) with
// incrementing bursts of 32-bit beats, and forwards each returned beat as a
// stream word. The final word carries `last` and a byte mask covering only
// the bytes of the packet. The document states that each DMA core reads the
// packets from DRAM through an S-GP port without CPU help; burst sizing, one
// burst in flight at a time and the error flag are this design's choices.
//
// Rules kept: bursts are at most MAX_BURST beats (16 for AXI3) and never
// cross a 4 KiB boundary; the start address must be 4-byte aligned.
// rready follows the stream's o_ready, so a stalled consumer stalls the bus.
// arsize and arburst are constant (4-byte beats, INCR) and the read data go
// straight to the stream word, so those outputs carry no logic of their own.
//
// Timing: `start` is taken when `idle`; `done` pulses after the last beat
// has been handed on. An error response sets `err` (sticky until start).
module dma_reader
  import auth_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            start,
  input  logic [AW-1:0]   addr,
  input  logic [LENW-1:0] len,
  output logic            idle,
  output logic            done,
  output logic            err,
  // AXI3 read address channel
  output logic [AW-1:0]   m_araddr,
  output logic [3:0]      m_arlen,
  output logic [2:0]      m_arsize,
  output logic [1:0]      m_arburst,
  output logic            m_arvalid,
  input  logic            m_arready,
  // AXI3 read data channel
  input  logic [DW-1:0]   m_rdata,
  input  logic [1:0]      m_rresp,
  input  logic            m_rlast,
  input  logic            m_rvalid,
  output logic            m_rready,
  // packet stream out
  output logic            o_valid,
  input  logic            o_ready,
  output beat_t           o_beat
);

  typedef enum logic [1:0] {S_IDLE, S_AR, S_R} state_e;
  state_e state_q;

  logic [AW-1:0]   addr_q;
  logic [LENW-1:0] req_left_q;   // words not yet requested
  logic [LENW-1:0] rx_left_q;    // words not yet forwarded
  logic [BW-1:0]   last_keep_q;
  logic [4:0]      blen_q;       // beats in the current burst
  logic            err_q;

  // beats of the next burst: limited by MAX_BURST, words left, 4 KiB page
  logic [10:0] to_page;
  logic [LENW-1:0] nbeats;
  always_comb begin
    to_page = 11'((13'h1000 - {1'b0, addr_q[11:0]}) >> 2);
    nbeats  = req_left_q;
    if (nbeats > LENW'(MAX_BURST)) nbeats = LENW'(MAX_BURST);
    if (32'(nbeats) > 32'(to_page)) nbeats = LENW'(to_page);
  end

  assign idle      = (state_q == S_IDLE);
  assign err       = err_q;
  assign m_araddr  = addr_q;
  assign m_arlen   = 4'(nbeats - 1'b1);
  assign m_arsize  = 3'b010;   // 4 bytes per beat
  assign m_arburst = 2'b01;    // INCR
  assign m_arvalid = (state_q == S_AR);

  assign m_rready    = (state_q == S_R) && o_ready;
  assign o_valid     = (state_q == S_R) && m_rvalid;
  assign o_beat.data = m_rdata;
  assign o_beat.last = (rx_left_q == LENW'(1));
  assign o_beat.keep = (rx_left_q == LENW'(1)) ? last_keep_q : {BW{1'b1}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      addr_q      <= '0;
      req_left_q  <= '0;
      rx_left_q   <= '0;
      last_keep_q <= '0;
      blen_q      <= '0;
      err_q       <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          addr_q      <= {addr[AW-1:2], 2'b00};
          req_left_q  <= bytes_to_words(len);
          rx_left_q   <= bytes_to_words(len);
          last_keep_q <= (len[1:0] == 2'd0) ? {BW{1'b1}} : BW'((1 << len[1:0]) - 1);
          err_q       <= 1'b0;
          if (len == '0) done <= 1'b1;
          else           state_q <= S_AR;
        end
        S_AR: if (m_arready) begin
          blen_q     <= 5'(nbeats);
          addr_q     <= addr_q + AW'({nbeats, 2'b00});
          req_left_q <= req_left_q - nbeats;
          state_q    <= S_R;
        end
        S_R: if (m_rvalid && m_rready) begin
          rx_left_q <= rx_left_q - 1'b1;
          blen_q    <= blen_q - 1'b1;
          if (m_rresp[1]) err_q <= 1'b1;
          if (m_rlast || blen_q == 5'd1) begin
            if (rx_left_q == LENW'(1)) begin
              done    <= 1'b1;
              state_q <= S_IDLE;
            end else begin
              state_q <= S_AR;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
