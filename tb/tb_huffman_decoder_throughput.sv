// tb_huffman_decoder_throughput: decode rate on a typical code word mix.
//
// Decodes 4800 cache lines (150 KB of program) whose bytes are drawn with
// the probabilities the code is built for: a code word of length L occurs
// with probability 2^-L, so short code words dominate as in real instruction
// streams (mean code length about 5.9 bits). Memory and cache answer their
// handshakes at once, so the decoder itself sets the pace; the 4-phase
// output handshake still holds decoding for about two clocks per word,
// since the 4-byte output buffer has no room until the cache has read it.
// Reports the distribution of clocks per byte, per 32-bit word and per
// 32-byte line, the split into 0-, 1- and 2-byte shift cycles, the mean
// symbol cycle without waits and the clocks spent waiting.
// Checks: every output word; every symbol that did not wait for input or
// output takes exactly 2, 3 or 5 clocks for 0, 1 or 2 byte shifts;
// two-byte shifts are the rarest kind; the measured mean code length
// agrees with the expected one within 3%.
module tb_huffman_decoder_throughput;
  import huff_pkg::*;
  import tb_huff_ref_pkg::*;

  localparam int NLINES   = 4800;
  localparam int MAXWORDS = NLINES * 16 + 8;

  logic clk = 0, rst = 1;
  logic [31:0] in_data = '0;
  logic in_rqst = 0, in_ack;
  logic [31:0] out_data;
  logic out_rqst, out_ack = 0;

  huffman_decoder dut (.clk, .rst, .in_data, .in_rqst, .in_ack, .out_data, .out_rqst, .out_ack);

  always #5 clk = ~clk;

  logic [31:0] mem [MAXWORDS];
  int          line_start [NLINES];
  logic [7:0]  line_bytes [NLINES][32];
  int nwords = 0;
  int total_bits = 0;
  real exp_mean_len = 0.0;

  int checks = 0, failures = 0;
  int n_shift [3];
  int sym_hist [8];      // clocks per byte, 0..7+
  int word_clocks = 0, line_clocks = 0;
  int words_timed = 0, min_line = 1 << 30, max_line = 0;
  int cycle = 0;
  int in_wait = 0, out_wait = 0;
  int line = 0;
  bit done = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired at line %0d", line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bytes drawn with probability 2^-len of their code word.
  initial begin
    code_table_t t;
    int cum [256];
    int acc;
    t = build_code();
    acc = 0;
    for (int i = 0; i < 256; i++) begin
      acc += 1 << (14 - t.len[i]);
      cum[i] = acc;
      exp_mean_len += real'(t.len[i]) * real'(1 << (14 - t.len[i])) / 16384.0;
    end
    for (int l = 0; l < NLINES; l++) begin
      logic bits [$];
      for (int k = 0; k < 32; k++) begin
        int r, idx;
        r = int'($urandom % 16384);
        idx = 0;
        while (cum[idx] <= r) idx++;
        line_bytes[l][k] = SYMBOLS[idx];
        total_bits += t.len[idx];
        for (int j = int'(t.len[idx]) - 1; j >= 0; j--) bits.push_back(t.code[idx][j]);
      end
      while (bits.size() % 32 != 0) bits.push_back(1'($urandom));
      line_start[l] = nwords;
      while (bits.size() != 0) begin
        logic [31:0] w;
        for (int j = 31; j >= 0; j--) w[j] = bits.pop_front();
        mem[nwords++] = w;
      end
    end
    for (int j = 0; j < 8; j++) mem[nwords++] = $urandom;
  end

  // Program memory answering at once.
  int mptr = 0;
  always @(posedge clk) begin
    if (rst) begin
      in_rqst <= 0;
      mptr    <= (line < NLINES) ? line_start[line] : 0;
    end else if (!in_rqst && !in_ack) begin
      in_data <= mem[mptr];
      in_rqst <= 1;
    end else if (in_rqst && in_ack) begin
      in_rqst <= 0;
      mptr    <= mptr + 1;
    end
  end

  // Cache refill logic answering at once; times words and lines.
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (line < NLINES) begin
      int line_t0, word_t0;
      line_t0 = cycle;
      word_t0 = cycle;
      for (int w = 0; w < 8; w++) begin
        logic [31:0] exp_w;
        while (!out_rqst) @(posedge clk);
        #1;
        if (w > 0) begin
          word_clocks += cycle - word_t0;
          words_timed++;
        end
        word_t0 = cycle;
        for (int i = 0; i < 4; i++) exp_w[31-8*i -: 8] = line_bytes[line][4*w+i];
        checks++;
        if (out_data !== exp_w) begin
          failures++;
          $display("line %0d word %0d: %h expected %h", line, w, out_data, exp_w);
        end
        out_ack = 1;
        while (out_rqst) @(posedge clk);
        #1 out_ack = 0;
      end
      line_clocks += cycle - line_t0;
      if (cycle - line_t0 < min_line) min_line = cycle - line_t0;
      if (cycle - line_t0 > max_line) max_line = cycle - line_t0;
      rst = 1;
      line++;
      @(posedge clk);
      #1 rst = 0;
    end
    done = 1;
  end

  function automatic int exp_clocks(int bytes);
    return (bytes == 0) ? 2 : 1 + 2 * bytes;
  endfunction

  int last_eval = -1, last_bytes = 0;
  bit stalled = 1;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) begin
      stalled = 1;
    end else begin
      if ((dut.u_shseq.f[0] | dut.u_shseq.f[2] | dut.u_shseq.f[4]) && !dut.ib_head_valid) begin
        stalled = 1;
        in_wait++;
      end
      if (!dut.phi && dut.shift_done && !dut.out_room) begin
        stalled = 1;
        out_wait++;
      end
      if (dut.eval_end) begin
        if (last_eval >= 0 && !stalled) begin
          checks++;
          if (cycle - last_eval != exp_clocks(last_bytes)) begin
            failures++;
            $display("symbol took %0d clocks, expected %0d", cycle - last_eval, exp_clocks(last_bytes));
          end
        end
        if (last_eval >= 0) sym_hist[(cycle - last_eval > 7) ? 7 : cycle - last_eval]++;
        last_eval  = cycle;
        last_bytes = dut.shift16 ? 2 : dut.shift8 ? 1 : 0;
        n_shift[last_bytes]++;
        stalled = 0;
      end
    end
  end

  initial begin
    real mean_len;
    wait (done);
    mean_len = real'(total_bits) / real'(NLINES * 32);
    $display("mean code length %0.3f bits (expected %0.3f)", mean_len, exp_mean_len);
    $display("symbol cycles: %0d with no shift, %0d with one byte, %0d with two bytes",
             n_shift[0], n_shift[1], n_shift[2]);
    for (int c = 1; c < 8; c++) $display("  %0d%s clocks between bytes: %0d", c, c == 7 ? "+" : "", sym_hist[c]);
    $display("mean clocks per 32-bit word %0.2f, per 32-byte line %0.1f (min %0d, max %0d)",
             real'(word_clocks) / real'(words_timed), real'(line_clocks) / real'(NLINES), min_line, max_line);
    $display("mean symbol cycle without waits %0.2f clocks, longest 5",
             real'(2 * n_shift[0] + 3 * n_shift[1] + 5 * n_shift[2]) / real'(n_shift[0] + n_shift[1] + n_shift[2]));
    $display("clocks waiting for input %0d, for output room %0d", in_wait, out_wait);
    $display("input bits per clock %0.3f", real'(total_bits) / real'(line_clocks));
    checks++;
    if (mean_len < 0.97 * exp_mean_len || mean_len > 1.03 * exp_mean_len) begin
      failures++; $display("mean code length off");
    end
    checks++;
    if (!(n_shift[2] < n_shift[0] && n_shift[2] < n_shift[1])) begin
      failures++; $display("two-byte shifts are not the rarest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
