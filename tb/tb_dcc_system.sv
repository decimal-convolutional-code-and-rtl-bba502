// tb_dcc_system: end-to-end test of the whole test system at its default
// parameters (the 6.3 code, four latent-bit repetitions, DIV = 2). The LFSR
// source, encoder, channel stage and decoder run freely; the test bench only
// drives the channel noise and watches.
//   Phase 1: no noise - every frame must decode exactly.
//   Phase 2: one code bit per frame fully inverted - must still decode exactly.
//   Phase 3: the latent-bit repetitions are pushed to a tie, so the decoder
//            must fall back on its path metrics - must decode exactly.
//   Phase 4: heavy random noise - only runs the counters; wrong frames are
//            allowed here but the counters must agree with the outputs.
// It checks the frame rate (one frame per (L + REP/2) * DIV system cycles),
// the decoded data against the design's own reference, the error counters,
// and counts how often each mechanism occurred: source stalls, break stages,
// latent bit forced, latent tie, corrected channel errors.
module tb_dcc_system;
  import dcc_pkg::*;

  localparam int K1 = DEF_K1, L = DEF_L, BS = DEF_BS, Q = DEF_Q, REP = DEF_REP;
  localparam int ND = L - (K1 - 2);
  localparam int NSYM = L + REP / 2;
  localparam int DIV = 2;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [Q:0] noise0, noise1;
  logic clk1, clk2, clk3, enc_valid, enc_sof, enc_rep, dec_valid, latent_known, latent_val;
  logic src_stall, dec_break;
  logic [Q-1:0] chan_r0, chan_r1;
  logic [1:0] enc_c;
  logic [ND-1:0] dec_data, ref_data;
  logic [31:0] frames, frame_errors, bit_errors;

  dcc_system dut (.*);

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters ----
  int n_stall, n_break, n_forced, n_tie, n_corrected, n_chan_err_frames;
  int phase, sym_idx, flip_at, last_dec_cycle, cycle, cur_errs;
  int errs_q [$];          // channel errors of each sent frame, oldest first
  int exp_frame_err, exp_bit_err;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (src_stall) n_stall++;
      if (dec_break) begin
        n_break++;
        if (latent_known) n_forced++; else n_tie++;
      end
    end
  end

  // Channel noise, set before the symbol is sampled.
  always @(negedge clk) begin
    noise0 = '0;
    noise1 = '0;
    if (enc_valid) begin
      int idx;
      idx = enc_sof ? 0 : sym_idx;
      if (idx == 0) begin
        flip_at = $urandom % NSYM;
        cur_errs = 0;
      end
      case (phase)
        2: if (idx == flip_at) begin
             if ($urandom % 2) noise0 = enc_c[1] ? -7 : 7;
             else              noise1 = enc_c[0] ? -7 : 7;
           end
        3: if (enc_rep) begin
             // push the four copies to 3, 4, 3, 4: sum exactly at the midpoint
             noise0 = enc_c[1] ? -4 : 3;
             noise1 = enc_c[0] ? -3 : 4;
           end
        4: begin
             noise0 = (Q+1)'(int'($urandom % 13) - 6);
             noise1 = (Q+1)'(int'($urandom % 13) - 6);
           end
        default: ;
      endcase
      #1;
      cur_errs += int'((chan_r0 >= 4) != enc_c[1]) + int'((chan_r1 >= 4) != enc_c[0]);
      if (idx == NSYM - 1) errs_q.push_back(cur_errs);
      sym_idx = idx + 1;
    end
  end

  // Decoded frames
  int frames_seen;
  always @(posedge clk) begin
    if (dec_valid) begin
      int ce;
      bit ok;
      ce = (errs_q.size() > 0) ? errs_q.pop_front() : 0;
      ok = (dec_data == ref_data);
      if (!ok) begin
        exp_frame_err++;
        exp_bit_err += $countones(dec_data ^ ref_data);
      end
      if (phase != 4) chk(ok, $sformatf("frame decoded exactly in phase %0d", phase));
      if (ce > 0) begin
        n_chan_err_frames++;
        if (ok) n_corrected++;
      end
      if (frames_seen > 0)
        chk(cycle - last_dec_cycle == NSYM * DIV, "one frame per (L + REP/2) * DIV cycles");
      last_dec_cycle = cycle;
      frames_seen++;
    end
  end

  initial begin
    noise0 = 0; noise1 = 0;
    n_stall = 0; n_break = 0; n_forced = 0; n_tie = 0; n_corrected = 0;
    n_chan_err_frames = 0; phase = 1; cur_errs = 0; sym_idx = 0; flip_at = 0; cycle = 0;
    last_dec_cycle = 0; frames_seen = 0; exp_frame_err = 0; exp_bit_err = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (phase = 1; phase <= 4; phase++) begin
      int target;
      target = frames_seen + ((phase == 4) ? 60 : 40);
      while (frames_seen < target) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    #1;
    chk(frames == 32'(frames_seen), "frame counter");
    chk(frame_errors == 32'(exp_frame_err), "frame error counter");
    chk(bit_errors == 32'(exp_bit_err), "bit error counter");
    $display("frames %0d, wrong frames %0d, wrong bits %0d",
             frames, frame_errors, bit_errors);
    $display("source stalls %0d, break stages %0d, latent forced %0d, latent ties %0d",
             n_stall, n_break, n_forced, n_tie);
    $display("frames with channel errors %0d, of them decoded correctly %0d",
             n_chan_err_frames, n_corrected);
    chk(n_stall > 0, "source stalled during tail and repetitions");
    chk(n_stall >= frames_seen * (NSYM - ND), "stalls per frame");
    chk(n_break >= frames_seen, "break stage in every frame");
    chk(n_forced > 0, "latent bit forced from its repetitions");
    chk(n_tie > 0, "latent tie resolved by the metrics");
    chk(n_corrected > 0, "channel errors corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
