// tb_rs_codec_top: the whole codec at its default size, RS(208,200), run end
// to end. The message ROM streams continuously; noise is switched on and off
// and the burst length varied between 0 and 8 symbols at random times (the
// channel samples them at each word start). Per word, the errors the channel
// actually made are counted from chan_err and compared with the decoder's
// report: up to t = 4 errors must be corrected exactly, more must be flagged
// or be miscorrected into a valid codeword. The decoded message stream must
// equal the ROM formula in order, words must leave once every N cycles, and
// neither concurrent checker may fire. Counts how often each mechanism
// happened: parity stalls of the source, ROM wrap-around, clean words,
// corrected words, words with a t-symbol burst and uncorrectable words.
module tb_rs_codec_top;
  import tb_rs_ref::*;
  localparam int N = 208, K = 200, T = 4, NWORDS = 48;
  logic clk = 0, rst_n = 0, run = 0, noise_en = 0;
  logic [3:0] burst_len = 0;
  logic dec_valid, dec_last, word_done, dec_detected, dec_fail, chan_valid, chan_err, enc_fault, dec_fault;
  logic [7:0] dec_data;
  logic [4:0] dec_nerr;
  int checks = 0, failures = 0, cyc = 0;
  int chan_cnt = 0, chan_errs = 0;
  int exp_err [$];
  int msg_idx = 0, words = 0, last_done = -1;
  int n_stall = 0, n_wrap = 0, n_clean = 0, n_corr = 0, n_burst_t = 0, n_fail = 0, n_miscorr = 0;

  rs_codec_top dut (.clk, .rst_n, .run, .noise_en, .burst_len, .dec_valid, .dec_data, .dec_last,
      .word_done, .dec_detected, .dec_nerr, .dec_fail, .chan_valid, .chan_err, .enc_fault, .dec_fault);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (NWORDS * N * 2 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel side: errors per word
  always @(posedge clk) if (rst_n) begin
    if (run && !dut.rom_ready) n_stall++;
    if (dut.rom_valid && dut.rom_ready && dut.u_rom.addr == 8'hFF) n_wrap++;
    if (chan_valid) begin
      chan_errs += int'(chan_err);
      chan_cnt++;
      if (chan_cnt == N) begin
        exp_err.push_back(chan_errs);
        chan_cnt = 0;
        chan_errs = 0;
      end
    end
  end

  // decoder side
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (enc_fault || dec_fault) begin
      failures++;
      $display("concurrent checker fired: enc %0d dec %0d", enc_fault, dec_fault);
    end
    if (dec_valid) begin
      int e;
      e = rom_word(msg_idx % 256);
      checks++;
      if (int'(dec_data) != e && !(exp_err.size() > 0 && exp_err[0] > T)) begin
        failures++;
        if (failures < 10) $display("message symbol %0d: got %0h expected %0h", msg_idx, dec_data, e);
      end
      msg_idx++;
    end
    if (word_done) begin
      int ne;
      ne = exp_err.pop_front();
      if (last_done >= 0) begin
        checks++;
        if (cyc - last_done != N) begin failures++; $display("word spacing %0d", cyc - last_done); end
      end
      last_done = cyc;
      checks++;
      if (ne <= T) begin
        if (dec_fail || int'(dec_nerr) != ne || dec_detected != (ne > 0)) begin
          failures++;
          $display("word %0d with %0d errors: fail %0d nerr %0d det %0d", words, ne, dec_fail, dec_nerr, dec_detected);
        end
        if (ne == 0) n_clean++; else n_corr++;
        if (ne == T) n_burst_t++;
      end else begin
        if (!dec_detected) failures++;
        if (dec_fail) n_fail++; else n_miscorr++;
      end
      words++;
    end
  end

  initial begin
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    while (words < NWORDS) begin
      @(negedge clk);
      if ($urandom % 150 == 0) begin
        int r;
        r = $urandom % 12;
        noise_en  = (r != 0);
        burst_len = (r < 8) ? 4'(r % (T + 1)) : 4'(T + 1 + (r % T));
      end
      if (words == 2) begin noise_en = 1; burst_len = 4'(T); end
    end
    run = 0;
    $display("stall cycles %0d, ROM wraps %0d, clean %0d, corrected %0d, t-bursts %0d, failed %0d, miscorrected %0d",
             n_stall, n_wrap, n_clean, n_corr, n_burst_t, n_fail, n_miscorr);
    checks++; if (n_stall < (N - K) * (NWORDS - 1)) failures++;
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_clean == 0) failures++;
    checks++; if (n_corr == 0) failures++;
    checks++; if (n_burst_t == 0) failures++;
    checks++; if (n_fail + n_miscorr == 0) failures++;
    checks++; if (msg_idx != NWORDS * K) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
