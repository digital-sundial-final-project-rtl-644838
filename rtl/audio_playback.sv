// audio_playback: streams one WAV file from the SD card to the speaker path.
// On start it reads the file of the selected track sector by sector (512 bytes)
// through the SD-card controller into one half of audio_buffer, then plays that
// half at the sample rate while the next sector is read into the other half; the
// halves keep swapping roles until TRACK_BYTES bytes have been played. The first
// WAV_HEADER_OFFSET bytes of the file (the WAV header) are skipped. Samples are
// 8-bit unsigned PCM; sample holds the last sample and sample_valid pulses once
// per sample period. If a half is not yet filled when playback reaches it, the
// player waits (underrun_count counts such waits).
// SD-controller handshake: with sd_ready high the player raises sd_rd with the
// byte address sd_addr and holds both until sd_ready falls; each rising edge of
// sd_byte_available then delivers one byte on sd_dout, 512 per sector.
// Sample timing: a phase accumulator adds SAMPLE_HZ per clock and wraps at
// CLK_HZ, giving the exact average rate from any clock.
// The two-half buffer scheme, sector size, header offset and 48 kHz rate follow
// the design. Track placement on the card (track k at k*TRACK_STRIDE) and the
// file length are this implementation's parameters.
module audio_playback #(
  parameter int unsigned  CLK_HZ            = 24_750_000,
  parameter int unsigned  SAMPLE_HZ         = 48_000,
  parameter int unsigned  SECTOR_BYTES      = 512,
  parameter int unsigned  WAV_HEADER_OFFSET = 44,
  parameter logic [31:0]  TRACK_STRIDE      = 32'h0010_0000,
  parameter logic [31:0]  TRACK_BYTES       = 32'h0007_6800
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [1:0]  track,
  // SD-card controller
  input  logic        sd_ready,
  output logic        sd_rd,
  output logic [31:0] sd_addr,
  input  logic [7:0]  sd_dout,
  input  logic        sd_byte_available,
  // output
  output logic [7:0]  sample,
  output logic        sample_valid,
  output logic        playing,
  output logic [15:0] underrun_count
);
  localparam int unsigned SB = $clog2(SECTOR_BYTES);
  localparam int unsigned CW = $clog2(CLK_HZ + SAMPLE_HZ);

  // ---- ping-pong memory ----
  logic          buf_we;
  logic [SB:0]   buf_waddr, buf_raddr;
  logic [7:0]    buf_rdata;

  audio_buffer #(.DEPTH(2 * SECTOR_BYTES)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(sd_dout),
    .raddr(buf_raddr), .rdata(buf_rdata)
  );

  // ---- sample-rate tick ----
  logic [CW-1:0] phase;
  logic          tick;
  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      tick <= 1'b0;
    end else if (phase + CW'(SAMPLE_HZ) >= CW'(CLK_HZ)) begin
      phase <= phase + CW'(SAMPLE_HZ) - CW'(CLK_HZ);
      tick <= 1'b1;
    end else begin
      phase <= phase + CW'(SAMPLE_HZ);
      tick <= 1'b0;
    end
  end

  // ---- fill side ----
  typedef enum logic [1:0] {F_IDLE, F_REQ, F_RECV} fill_t;
  fill_t        fstate;
  logic [1:0]   full;          // half h holds a sector not yet played
  logic         fill_half, play_half;
  logic [31:0]  next_addr;     // next sector address on the card
  logic [31:0]  end_addr;
  logic [SB:0]  fcount;
  logic         bav_q;

  // ---- play side ----
  logic [31:0]  played;        // bytes of the file consumed (header included)
  logic [SB-1:0] pidx;
  logic         rd_pending, rd_pending2;

  always_ff @(posedge clk) begin
    if (rst) begin
      fstate <= F_IDLE;
      full <= '0;
      fill_half <= 1'b0;
      play_half <= 1'b0;
      next_addr <= '0;
      end_addr <= '0;
      fcount <= '0;
      bav_q <= 1'b0;
      sd_rd <= 1'b0;
      sd_addr <= '0;
      buf_we <= 1'b0;
      buf_waddr <= '0;
      buf_raddr <= '0;
      playing <= 1'b0;
      played <= '0;
      pidx <= '0;
      rd_pending <= 1'b0;
      rd_pending2 <= 1'b0;
      sample <= 8'h80;
      sample_valid <= 1'b0;
      underrun_count <= '0;
    end else begin
      buf_we <= 1'b0;
      sample_valid <= 1'b0;
      bav_q <= sd_byte_available;

      if (start && !playing) begin
        playing <= 1'b1;
        next_addr <= 32'(track) * TRACK_STRIDE;
        end_addr <= 32'(track) * TRACK_STRIDE + TRACK_BYTES;
        full <= '0;
        fill_half <= 1'b0;
        play_half <= 1'b0;
        played <= 32'(WAV_HEADER_OFFSET);
        pidx <= SB'(WAV_HEADER_OFFSET);
        fstate <= F_IDLE;
        rd_pending <= 1'b0;
      end else if (playing && played >= TRACK_BYTES && !rd_pending && !rd_pending2) begin
        playing <= 1'b0;
        sd_rd <= 1'b0;
        fstate <= F_IDLE;
        sample <= 8'h80;
      end else if (playing) begin
        // fill: request the next sector into the free half
        unique case (fstate)
          F_IDLE: if (!full[fill_half] && next_addr < end_addr && sd_ready) begin
            sd_rd <= 1'b1;
            sd_addr <= next_addr;
            fstate <= F_REQ;
          end
          F_REQ: if (!sd_ready) begin
            sd_rd <= 1'b0;
            fcount <= '0;
            fstate <= F_RECV;
          end
          F_RECV: if (sd_byte_available && !bav_q) begin
            buf_we <= 1'b1;
            buf_waddr <= {fill_half, fcount[SB-1:0]};
            if (fcount == (SB+1)'(SECTOR_BYTES - 1)) begin
              full[fill_half] <= 1'b1;
              fill_half <= ~fill_half;
              fstate <= F_IDLE;
              next_addr <= next_addr + 32'(SECTOR_BYTES);
            end
            fcount <= fcount + 1'b1;
          end
          default: fstate <= F_IDLE;
        endcase

        // play: one byte per tick from the current half
        // buf_raddr is registered and the memory adds one more clock
        rd_pending2 <= rd_pending;
        if (rd_pending) rd_pending <= 1'b0;
        if (rd_pending2) begin
          sample <= buf_rdata;
          sample_valid <= 1'b1;
        end
        if (tick && played < TRACK_BYTES) begin
          if (full[play_half]) begin
            buf_raddr <= {play_half, pidx};
            rd_pending <= 1'b1;
            played <= played + 1'b1;
            pidx <= pidx + 1'b1;
            if (pidx == '1) begin
              full[play_half] <= 1'b0;
              play_half <= ~play_half;
            end
          end else if (played != 32'(WAV_HEADER_OFFSET)) begin
            underrun_count <= underrun_count + 1'b1;
          end
        end
      end
    end
  end
endmodule
