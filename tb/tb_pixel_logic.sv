// tb_pixel_logic: self-checking testbench for the digital part of a pixel,
// driven with the local oscillator model as its fast clock.
//
// For hits at many offsets inside the 25 ns event cycle it reads the pixel
// out through the serial chain and checks, after decoding the LFSR states
// with a hand-written table, that the fast count equals the number of
// oscillator periods that fit between the hit and the end of the cycle
// (first edge 0.893 ns after the hit, then every 1.786 ns) and that the
// latency count equals the number of event cycles before readout. It also
// checks the bit order of the readout, the pass-through of the chain, the
// clear after readout, self clear, hold mode and the configuration chain.
module tb_pixel_logic;
  import gossipo_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic       reset = 0, event_clk = 0, read = 0, en_clear = 1, disc = 0;
  logic       osc_clk, osc_go, data_in = 0, data_out;
  logic       cfg_clk = 0, cfg_in = 0, cfg_out;
  pixel_cfg_t cfg;
  logic       hit, clear_hit;
  logic [3:0] fast_q, lat_q;
  int         checks = 0, failures = 0;

  // Two reset pulses: the first clears the flip-flops that also drive the
  // counters' clear line, so the second gives that line a clean edge.
  initial begin #0.5 reset = 1; #0.5 reset = 0; #0.5 reset = 1; end

  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  pixel_logic dut (.*);
  local_osc   osc (.osc_go, .vdd_mv(12'd1200), .temp_c(8'sd27), .osc_out(osc_clk));

  always #12.5 event_clk = ~event_clk;

  function automatic int decode(input logic [3:0] s);
    for (int i = 0; i < 15; i++) if (SEQ[i] == s) return i;
    return -1;
  endfunction

  // Oscillator edges that fit in a window of w ns after the hit.
  function automatic int expected_fast(input real w);
    return (w > 0.893) ? int'($floor((w - 0.893) / 1.786)) + 1 : 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic to_low(); @(negedge event_clk); #2; endtask
  task automatic cycles(input int n); repeat (n) @(posedge event_clk); endtask

  // Read n bits from the chain; bits[0] is the first to appear.
  task automatic readout(input int n, output logic [63:0] bits);
    bits = '0;
    to_low();
    read = 1;
    for (int i = 0; i < n; i++) begin
      #1 bits[i] = data_out;
      @(posedge event_clk);
      @(negedge event_clk); #2;
    end
    read = 0;
    #1;
  endtask

  task automatic read_pixel(output int lat, output int fast);
    logic [63:0] b;
    readout(8, b);
    lat  = decode({b[0], b[1], b[2], b[3]});
    fast = decode({b[4], b[5], b[6], b[7]});
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, fast;
    logic [63:0] b;
    cycles(2); to_low();
    reset = 0;
    // --- Drift time: hits at offsets 0.3 .. 24.7 ns after a rising edge.
    for (int k = 0; k < 40; k++) begin
      real off;
      int  m;
      off = 0.3 + k * 0.61;
      m = k % 12;
      @(posedge event_clk);
      #(off * 1ns);
      disc = 1;
      #(0.2ns) disc = 0;
      // Latency: read in the low phase after m counted cycles.
      @(posedge event_clk);            // end of the hit cycle
      repeat (m) @(posedge event_clk);
      read_pixel(lat, fast);
      check(fast == expected_fast(25.0 - off),
            $sformatf("offset %.2f ns: fast count %0d, expected %0d", off, fast,
                      expected_fast(25.0 - off)));
      check(lat == m, $sformatf("latency %0d, expected %0d", lat, m));
      check(!hit && fast_q == 0 && lat_q == 0, "pixel cleared after readout");
    end
    // --- Chain pass-through: after 8 shifts the input reappears.
    begin
      logic [15:0] pat;
      pat = 16'hB38D;
      to_low(); read = 1;
      for (int i = 0; i < 16; i++) begin
        data_in = pat[i];
        #1 b[i] = data_out;
        @(posedge event_clk); @(negedge event_clk); #2;
      end
      read = 0; data_in = 0;
      check(b[15:8] == pat[7:0], "chain delay of 8 bits");
      check(b[7:0] == 8'h00, "empty pixel reads zero");
    end
    // --- Self clear: hit left for 20 cycles is gone.
    to_low(); disc = 1; #5 disc = 0;
    cycles(20);
    check(!hit, "self clear removed the old hit");
    read_pixel(lat, fast);
    check(lat == 0 && fast == 0, "self-cleared pixel reads zero");
    // --- Hold mode: hit kept for 30 cycles, latency not counted.
    en_clear = 0;
    @(posedge event_clk); #20; disc = 1; #2 disc = 0;
    cycles(30);
    read_pixel(lat, fast);
    check(lat == 0 && fast == expected_fast(5.0), "hold mode keeps the hit, no latency");
    en_clear = 1;
    // --- Configuration chain: shift a word in, check fields and cfg_out.
    begin
      logic [11:0] w;
      logic [5:0]  seen;
      w = 12'b101101_011010;
      for (int i = 11; i >= 0; i--) begin
        cfg_in = w[i];
        if (i < 6) seen[i] = cfg_out;
        #5 cfg_clk = 1; #5 cfg_clk = 0;
      end
      check(cfg == pixel_cfg_t'(w[5:0]), "configuration word loaded");
      check(seen == w[11:6], "previous word leaves at cfg_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
