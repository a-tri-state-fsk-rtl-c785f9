// End-to-end stimulus and checks shared by the demodulator testbenches.
//
// The including module declares the localparams F0_HZ, FN_HZ, F1_HZ (the three
// symbol frequencies), FSHORT_HZ and FLONG_HZ (out-of-band frequencies above
// and below the accepted band), NFRAMES and FRAME_BITS, instantiates the
// demodulator as "dut" with the signals below and the source as "src", and
// holds the watchdog.
//
// The stream is NFRAMES frames of FRAME_BITS random bits. Between bits the
// bench inserts random runs of neutral cycles (freezes) and, now and then, a
// too-short or too-long cycle (errors). For each cycle it predicts from the
// frequency alone what the demodulator must do and checks, three quarters
// into the cycle (after the sampling edge): data_out, error_n and the symbol;
// and at the same point the shift register contents and bit count, which must
// hold exactly the valid bits of all earlier cycles. Falling edges of the
// recovered clock are counted per cycle: one after each valid bit, none after
// a neutral or bad cycle. After each frame the frame register must equal the
// bits sent. Each mechanism (0, 1, freeze, short error, long error, recovery
// after an error) is counted and must have happened.

  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_neutral = 0, n_short = 0, n_long = 0, n_recover = 0;
  int clk_falls = 0;

  logic [FRAME_BITS-1:0] exp_frame = '0;
  int unsigned           exp_count = 0;
  logic                  exp_data  = 1'b0;
  logic                  pend_valid = 1'b0;   // a bit waits for the next falling edge
  logic                  pend_bit   = 1'b0;
  logic                  prev_err   = 1'b0;

  always @(negedge clock_out) clk_falls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // One carrier cycle of the given frequency, then the checks.
  // kind: 0 = bit 0, 1 = bit 1, 2 = neutral, 3 = error
  task automatic cycle(input real f_hz, input int kind);
    real period = 1.0e9 / f_hz;
    int  falls0;
    falls0 = clk_falls;
    // The previous cycle's bit is shifted in at this cycle's falling edge.
    if (pend_valid) begin
      exp_frame = {exp_frame[FRAME_BITS-2:0], pend_bit};
      exp_count++;
    end
    fork
      src.send_cycle(period);
      begin
        #(period * 0.75);
        check(clk_falls - falls0 == (pend_valid ? 1 : 0),
              $sformatf("recovered clock edges in cycle (%0d)", clk_falls - falls0));
        case (kind)
          0: begin exp_data = 1'b0; check(symbol == SYM_ZERO, "symbol 0"); end
          1: begin exp_data = 1'b1; check(symbol == SYM_ONE, "symbol 1"); end
          2: check(symbol == SYM_NEUTRAL, "symbol neutral");
          default: check(symbol == SYM_ERROR, "symbol error");
        endcase
        check(data_out == exp_data, "data_out");
        check(error_n == (kind != 3), "error_n");
        check(clock_out == 1'b1, "clock_out high in the high half");
        check(frame == exp_frame, "shift register contents");
        check(bit_count == exp_count, "bits taken");
      end
    join
    pend_valid = (kind < 2);
    pend_bit   = (kind == 1);
    if (prev_err && kind < 2) n_recover++;
    prev_err = (kind == 3);
  endtask

  initial begin
    logic [FRAME_BITS-1:0] word;
    int r;
    src.idle(1000.0);
    rst_n = 1'b0;
    src.idle(1000.0);
    rst_n = 1'b1;
    // Neutral lead-in: nothing may be clocked.
    repeat (4) begin cycle(FN_HZ, 2); n_neutral++; end
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < FRAME_BITS; i++) word[i] = 1'($urandom);
      for (int i = FRAME_BITS - 1; i >= 0; i--) begin
        r = $urandom_range(0, 99);
        if (r < 25) begin
          repeat ($urandom_range(1, 6)) begin cycle(FN_HZ, 2); n_neutral++; end
        end else if (r < 29) begin
          cycle(FSHORT_HZ, 3); n_short++;
        end else if (r < 33) begin
          cycle(FLONG_HZ, 3); n_long++;
        end
        if (word[i]) begin cycle(F1_HZ, 1); n_one++; end
        else         begin cycle(F0_HZ, 0); n_zero++; end
      end
      // A neutral cycle lets the last bit in and freezes the frame.
      cycle(FN_HZ, 2); n_neutral++;
      check(frame == word, $sformatf("frame %0d received intact", f));
    end
    check(n_one > 0,     "bit 1 happened");
    check(n_zero > 0,    "bit 0 happened");
    check(n_neutral > 0, "neutral freeze happened");
    check(n_short > 0,   "too-short error happened");
    check(n_long > 0,    "too-long error happened");
    check(n_recover > 0, "recovery after an error happened");
    $display("cycles: one=%0d zero=%0d neutral=%0d short=%0d long=%0d recover=%0d bits=%0d",
             n_one, n_zero, n_neutral, n_short, n_long, n_recover, bit_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
