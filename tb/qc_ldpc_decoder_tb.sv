// qc_ldpc_decoder_tb: end-to-end test of the full-size decoder (default
// parameters: N = 648, rate 1/2, z = 27).
//
// Frames are random code words from the reference encoder, sent as 4-bit
// sign-magnitude channel values with a few sign errors. Every frame is also
// decoded by the bit-true reference model; the decoder must match it in the
// decided word, the iteration count and the success flag, and must take
// I + 2 cycles from the cycle that samples start to the done pulse.
// Mechanisms that must each occur at least once: early stop on a passing
// parity check, stop at the iteration limit, a corrected channel error,
// saturation of a variable-to-check message, a limit of 0 taken as 1, and a
// start request ignored while busy.
module qc_ldpc_decoder_tb;
  import qc_ldpc_pkg::*;
  import ldpc_tb_pkg::*;

  localparam int NFRAMES = 24;

  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] max_iter = '0;
  msg_t llr [N];
  logic busy, done, success;
  logic [5:0] iterations;
  logic [N-1:0] codeword;

  int checks = 0, failures = 0, cyc = 0;
  int n_early = 0, n_limit = 0, n_corrected = 0, n_sat = 0, n_zero_limit = 0, n_ignored = 0;

  qc_ldpc_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Channel values for word cw: correct sign with magnitude 1..7, except a
  // sign error (magnitude 1..3) with probability perr/1000.
  function automatic void make_llr(bit [N-1:0] cw, int perr, output msg_t l [N]);
    for (int c = 0; c < N; c++) begin
      if ($urandom_range(999) < perr) begin
        l[c].sign = ~cw[c];
        l[c].mag  = 3'($urandom_range(3, 1));
      end else begin
        l[c].sign = cw[c];
        l[c].mag  = 3'($urandom_range(7, 1));
      end
    end
  endfunction

  task automatic decode_frame(msg_t l [N], int limit, bit [N-1:0] sent, string tag);
    bit [N-1:0] ref_cw, chan;
    int ref_it, ref_sat, lat, eff;
    bit ref_ok;
    ref_decode(l, limit, ref_cw, ref_it, ref_ok, ref_sat);
    @(negedge clk);
    llr      = l;
    max_iter = 6'(limit);
    start    = 1;
    lat      = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
      // a second request while busy must be ignored
      start = (lat == 3);
      if (lat == 3 && busy) n_ignored++;
    end while (!done && lat < 200);
    start = 0;
    check(done, {tag, ": done seen"});
    check(codeword == ref_cw, {tag, ": decided word matches reference"});
    check(int'(iterations) == ref_it,
          $sformatf("%s: iterations %0d, reference %0d", tag, iterations, ref_it));
    check(success == ref_ok, {tag, ": success flag matches reference"});
    check(success == (ref_syndrome(codeword) == '0), {tag, ": success flag matches parity"});
    check(lat == ref_it + 3, $sformatf("%s: latency %0d edges, expected %0d", tag, lat, ref_it + 3));
    eff = (limit == 0) ? 1 : limit;
    if (success && int'(iterations) < eff) n_early++;
    if (!success && int'(iterations) == eff) n_limit++;
    if (limit == 0 && iterations == 1) n_zero_limit++;
    for (int c = 0; c < N; c++) chan[c] = l[c].sign & (l[c].mag != 0);
    if (chan != sent && codeword == sent) n_corrected++;
    if (ref_sat > 0) n_sat++;
    // Result holds until the next start.
    repeat (3) @(negedge clk);
    check(!busy && codeword == ref_cw, {tag, ": result held while idle"});
  endtask

  initial begin
    msg_t l [N];
    bit [K-1:0] u;
    bit [N-1:0] cw;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // All-zero code word, clean channel.
    cw = '0;
    make_llr(cw, 0, l);
    decode_frame(l, 10, cw, "zero word");
    check(success && codeword == cw, "zero word decoded");

    // Random code words over a noisy channel.
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < K; i++) u[i] = 1'($urandom);
      cw = encode(u);
      make_llr(cw, 10 + 5 * (f % 6), l);
      decode_frame(l, 20, cw, $sformatf("frame %0d", f));
      if (success) check(codeword[K-1:0] == u, $sformatf("frame %0d: information bits", f));
    end

    // Hopeless frame: random values, small limit.
    for (int c = 0; c < N; c++) l[c] = msg_t'($urandom_range(15));
    decode_frame(l, 3, cw, "random values");

    // Limit 0 behaves as 1.
    for (int i = 0; i < K; i++) u[i] = 1'($urandom);
    cw = encode(u);
    make_llr(cw, 30, l);
    decode_frame(l, 0, cw, "limit 0");

    $display("early stops %0d, limit stops %0d, corrected frames %0d, frames with saturation %0d, limit-0 frames %0d, ignored starts %0d",
             n_early, n_limit, n_corrected, n_sat, n_zero_limit, n_ignored);
    check(n_early > 0,      "early stop exercised");
    check(n_limit > 0,      "iteration-limit stop exercised");
    check(n_corrected > 0,  "channel errors corrected");
    check(n_sat > 0,        "message saturation exercised");
    check(n_zero_limit > 0, "limit 0 exercised");
    check(n_ignored > 0,    "start while busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
