// audio_playback_tb: plays each of the four tracks in turn, short ones, from the
// SD-card model. For every track it checks that the
// first sample is the byte after the 44-byte header, that every sample equals
// the card byte at the expected address, that the samples come at the sample
// rate, that the number of samples is the file length minus the header, that
// sectors are read from the selected track's address, and that no underrun
// happens when the card is fast enough. Clock and sample rate are scaled
// (CLK_HZ 1 MHz, 20 kHz samples) to keep the run short.
module audio_playback_tb;
  localparam int unsigned CLK_HZ = 1_000_000, SR = 20_000, TBYTES = 2048 + 100;
  localparam logic [31:0] STRIDE = 32'h0001_0000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0; logic [1:0] track = 0;
  logic sd_ready, sd_rd, bav; logic [31:0] sd_addr; logic [7:0] sd_dout;
  logic [7:0] sample; logic sv, playing; logic [15:0] underruns;
  int sectors;

  audio_playback #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SR), .TRACK_STRIDE(STRIDE), .TRACK_BYTES(TBYTES)) dut (
    .clk, .rst, .start, .track, .sd_ready, .sd_rd, .sd_addr, .sd_dout, .sd_byte_available(bav),
    .sample, .sample_valid(sv), .playing, .underrun_count(underruns));

  sd_card_model #(.BYTE_GAP(4)) u_sd (.clk, .rst, .rd(sd_rd), .addr(sd_addr), .ready(sd_ready),
    .dout(sd_dout), .byte_available(bav), .sectors_read(sectors));

  function automatic logic [7:0] card_byte(input logic [31:0] a);
    return 8'(a ^ (a >> 8) ^ (a >> 16) ^ 32'h5A);
  endfunction

  int nsamp = 0, last_t = -1, bad_gap = 0, bad_addr = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (!rst && sd_rd && sd_ready) begin
    if (sd_addr < 32'(track) * STRIDE || sd_addr >= 32'(track) * STRIDE + TBYTES || sd_addr[8:0] != 0) bad_addr++;
  end
  always @(posedge clk) if (!rst && sv) begin
    logic [31:0] a;
    a = 32'(track) * STRIDE + 32'(44 + nsamp);
    checks++;
    if (sample != card_byte(a)) begin failures++; $display("FAIL sample %0d = %h want %h", nsamp, sample, card_byte(a)); end
    if (last_t >= 0 && (cyc - last_t < 49 || cyc - last_t > 51)) bad_gap++;
    last_t = cyc;
    nsamp++;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      int sectors0;
      track = 2'(t);
      nsamp = 0; last_t = -1; sectors0 = sectors;
      repeat (20) @(negedge clk);
      start = 1;
      @(negedge clk) start = 0;
      checks++;
      if (!playing) begin failures++; $display("FAIL track %0d not playing", t); end
      while (playing) @(negedge clk);
      checks += 5;
      if (nsamp != TBYTES - 44) begin failures++; $display("FAIL track %0d samples %0d", t, nsamp); end
      if (bad_gap != 0) begin failures++; $display("FAIL sample spacing %0d", bad_gap); end
      if (bad_addr != 0) begin failures++; $display("FAIL sector address"); end
      if (sectors - sectors0 != (TBYTES + 511) / 512) begin failures++; $display("FAIL sectors %0d", sectors - sectors0); end
      if (underruns != 0) begin failures++; $display("FAIL underruns %0d", underruns); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
