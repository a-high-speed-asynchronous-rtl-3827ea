// tb_huffman_decoder: end-to-end test of the decoder at its default size.
//
// Generates cache lines of 32 bytes (the first eight lines hold all 256
// byte values, the rest are random with many zero bytes, the most frequent
// instruction byte), encodes each with the reference canonical code, and
// stores the lines one after the other in a word memory, each line starting
// on a word boundary. A memory model pushes words over the 4-phase input
// handshake and keeps reading on past the end of a line, as a program memory
// would; a refill model takes the 8 output words of a line over the 4-phase
// output handshake, checks them, and then resets the decoder and restarts
// the memory at the next line. Both sides insert random delays, sometimes
// long ones, so that the decoder also waits for input and for the output.
//
// Counted mechanisms (each must occur): symbols needing no byte shift, one
// and two byte shifts, the zero-byte ROM bypass, input buffer reloads,
// waiting for input data, waiting for output room, and cache-line resets;
// every match class must be used. The decode rate is checked too: when
// neither side made it wait, consecutive symbols are 2, 3 or 5 clocks apart
// when the input buffer had to shift by 0, 1 or 2 bytes.
module tb_huffman_decoder;
  import huff_pkg::*;
  import tb_huff_ref_pkg::*;

  localparam int NLINES  = 300;
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

  int checks = 0, failures = 0;
  int n_shift0 = 0, n_shift8 = 0, n_shift16 = 0, n_bypass = 0, n_reload = 0;
  int n_in_wait = 0, n_out_wait = 0, n_resets = 0, n_rate = 0;
  int class_hits [NUM_CLASSES];
  int cycle = 0;
  int line = 0;       // line being decoded
  bit done = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired at line %0d", line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    code_table_t t;
    t = build_code();
    for (int l = 0; l < NLINES; l++) begin
      logic bits [$];
      for (int k = 0; k < 32; k++) begin
        logic [7:0] s;
        if (l < 8) s = SYMBOLS[l * 32 + k];
        else if ($urandom % 3 == 0) s = 8'h00;
        else if ($urandom % 2 == 0) s = SYMBOLS[$urandom % 64];
        else s = 8'($urandom);
        line_bytes[l][k] = s;
        begin
          int idx;
          idx = index_of(s);
          for (int j = int'(t.len[idx]) - 1; j >= 0; j--) bits.push_back(t.code[idx][j]);
        end
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

  // Program memory: pushes words from the current line onwards.
  int mptr = 0;
  always @(posedge clk) begin
    if (rst) begin
      in_rqst <= 0;
      mptr    <= (line < NLINES) ? line_start[line] : 0;
    end else if (!in_rqst && !in_ack) begin
      if ($urandom % ((line % 10 == 3) ? 40 : 3) == 0) begin
        in_data <= mem[mptr];
        in_rqst <= 1;
      end
    end else if (in_rqst && in_ack) begin
      in_rqst <= 0;
      mptr    <= mptr + 1;
    end
  end

  // Cache refill logic: takes 8 words, checks them, then resets the decoder.
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (line < NLINES) begin
      for (int w = 0; w < 8; w++) begin
        logic [31:0] exp_w;
        while (!out_rqst) @(posedge clk);
        repeat ((line % 10 == 6) ? 20 + $urandom % 20 : $urandom % 3) @(posedge clk);
        #1;
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
      rst = 1;
      line++;
      n_resets++;
      @(posedge clk);
      @(posedge clk);
      #1 rst = 0;
    end
    done = 1;
  end

  // ------------------------------------------------------------- monitoring
  // Clocks per symbol: one to evaluate, one to precharge, and 2n-1 more
  // for n byte shifts.
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
      if (dut.ib_load) n_reload++;
      if ((dut.u_shseq.f[0] | dut.u_shseq.f[2] | dut.u_shseq.f[4]) && !dut.ib_head_valid) begin
        n_in_wait++;
        stalled = 1;
      end
      if (!dut.phi && dut.shift_done && !dut.out_room) begin
        n_out_wait++;
        stalled = 1;
      end
      if (dut.eval_end) begin
        for (int c = 0; c < NUM_CLASSES; c++) if (dut.match[c]) class_hits[c]++;
        if (dut.match[0]) n_bypass++;
        if (!stalled) begin
          checks++;
          n_rate++;
          if (cycle - last_eval != exp_clocks(last_bytes)) begin
            failures++;
            $display("symbol took %0d clocks, expected %0d", cycle - last_eval, exp_clocks(last_bytes));
          end
        end
        last_eval  = cycle;
        last_bytes = dut.shift16 ? 2 : dut.shift8 ? 1 : 0;
        if (dut.shift0) n_shift0++;
        if (dut.shift8) n_shift8++;
        if (dut.shift16) n_shift16++;
        stalled = 0;
      end
    end
  end

  initial begin
    wait (done);
    $display("lines=%0d shift0=%0d shift8=%0d shift16=%0d bypass=%0d reloads=%0d in_waits=%0d out_waits=%0d rate_checks=%0d",
             n_resets, n_shift0, n_shift8, n_shift16, n_bypass, n_reload, n_in_wait, n_out_wait, n_rate);
    checks++; if (n_shift0 == 0)   begin failures++; $display("no zero-shift symbol"); end
    checks++; if (n_shift8 == 0)   begin failures++; $display("no one-byte shift"); end
    checks++; if (n_shift16 == 0)  begin failures++; $display("no two-byte shift"); end
    checks++; if (n_bypass == 0)   begin failures++; $display("no zero-byte bypass"); end
    checks++; if (n_reload == 0)   begin failures++; $display("no reload"); end
    checks++; if (n_in_wait == 0)  begin failures++; $display("never waited for input"); end
    checks++; if (n_out_wait == 0) begin failures++; $display("never waited for output room"); end
    checks++; if (n_resets != NLINES) begin failures++; $display("line resets %0d", n_resets); end
    checks++; if (n_rate == 0)     begin failures++; $display("no rate check"); end
    for (int c = 0; c < NUM_CLASSES; c++) begin
      checks++;
      if (class_hits[c] == 0) begin failures++; $display("class %0d never used", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
