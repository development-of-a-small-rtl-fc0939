// tb_pixel_array: self-checking testbench for the pixel matrix, run at
// 3 rows x 4 columns so that both meander directions occur.
//
// It loads the configuration chain and reads it back through cfg_out, masks
// two pixels, then strikes every pixel in a different event cycle (so every
// pixel gets its own latency) and reads the whole chain out. Each 8-bit group
// is assigned to a pixel with the meander rule (up even columns, down odd
// columns) and compared with the expected drift and latency counts.
module tb_pixel_array;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 3, NC = 4, NP = NR * NC;

  logic          reset = 0, event_clk = 0, read = 0, en_clear = 1;
  logic          cfg_clk = 0, cfg_in = 0, cfg_out, data_in = 0, data_out;
  logic [NP-1:0] pad_strike = '0, hit, clear_hit;
  logic [15:0]   pad_charge_e [NP];
  logic          test_pulse = 0;
  logic [11:0]   test_step_mv = 0, threshold_mv = 100;
  logic [7:0]    dac_range_mv = 130;
  logic [11:0]   vdd_mv = 1200;   // reference supply, 560 MHz oscillators
  logic signed [7:0] offset_mv [NP] = '{default: '0};  // no threshold spread
  logic [7:0]    noise_e = 0;
  logic signed [7:0] temp_c = 27;
  int            checks = 0, failures = 0;

  // Two reset pulses: the first clears the flip-flops that also drive the
  // counters' clear line, so the second gives that line a clean edge.
  initial begin #0.5 reset = 1; #0.5 reset = 0; #0.5 reset = 1; end

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  pixel_array #(.NROWS(NR), .NCOLS(NC)) dut (.*);

  always #12.5 event_clk = ~event_clk;

  function automatic int decode(input logic [3:0] s);
    for (int i = 0; i < 15; i++) if (SEQ[i] == s) return i;
    return -1;
  endfunction

  function automatic int expected_fast(input real w);
    return (w > 0.893) ? int'($floor((w - 0.893) / 1.786)) + 1 : 0;
  endfunction

  // Pixel index (row * NC + col) at chain position k.
  function automatic int pixel_at(input int k);
    int c, r;
    c = k / NR;
    r = (c % 2 == 0) ? k % NR : NR - 1 - k % NR;
    return r * NC + c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic to_low(); @(negedge event_clk); #2; endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6*NP-1:0] pattern, back;
    logic [8*NP-1:0] bits;
    bit              masked [NP];
    real             off [NP];
    foreach (pad_charge_e[i]) pad_charge_e[i] = 16'd5000;
    repeat (2) @(posedge event_clk);
    to_low();
    reset = 0;
    // Configuration chain: shift a pattern through and read it back.
    for (int i = 0; i < 6 * NP; i++) pattern[i] = 1'($urandom);
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 6 * NP; i++) begin
        cfg_in = (pass == 0) ? pattern[i] : 1'b0;
        if (pass == 1) back[i] = cfg_out;
        #5 cfg_clk = 1; #5 cfg_clk = 0;
      end
    check(back == pattern, "configuration chain of 6 bits per pixel reads back");
    // Mask pixels 4 and 9: the word for chain position k is shifted in
    // after the words of positions above it.
    foreach (masked[i]) masked[i] = (i == 4 || i == 9);
    for (int k = NP - 1; k >= 0; k--)
      for (int b = 5; b >= 0; b--) begin
        cfg_in = (b == 4) ? masked[pixel_at(k)] : 1'b0;
        #5 cfg_clk = 1; #5 cfg_clk = 0;
      end
    // Strike pixel i in cycle i, 1 + 0.7 i ns after the rising edge.
    for (int i = 0; i < NP; i++) begin
      @(posedge event_clk);
      off[i] = 1.0 + 0.7 * i;
      #(off[i] * 1ns);
      pad_strike[i] = 1; #0.1 pad_strike[i] = 0;
    end
    // The last pixel's window closes at the next edge; read after one more.
    @(posedge event_clk);
    @(posedge event_clk);
    check(hit == ~(NP'(1) << 4 | NP'(1) << 9), "every unmasked pixel holds a hit");
    to_low();
    read = 1;
    for (int i = 0; i < 8 * NP; i++) begin
      #1 bits[i] = data_out;
      @(posedge event_clk); @(negedge event_clk); #2;
    end
    read = 0;
    #1;
    check(hit == '0, "all pixels cleared after readout");
    for (int k = 0; k < NP; k++) begin
      int p, pos, lat, fast, exp_lat, exp_fast;
      p   = pixel_at(k);
      pos = (NP - 1 - k) * 8;
      lat  = decode({bits[pos], bits[pos+1], bits[pos+2], bits[pos+3]});
      fast = decode({bits[pos+4], bits[pos+5], bits[pos+6], bits[pos+7]});
      // Pixel p was struck in cycle p, its window closed at the next edge,
      // and every later edge up to the readout was counted.
      exp_lat  = masked[p] ? 0 : NP - p;
      exp_fast = masked[p] ? 0 : expected_fast(25.0 - off[p] - 8.0);
      check(lat == exp_lat && fast == exp_fast,
            $sformatf("chain position %0d = pixel %0d: lat %0d/%0d fast %0d/%0d",
                      k, p, lat, exp_lat, fast, exp_fast));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
