// tb_cpfp_top -- end-to-end testbench of the conversion core at its default
// (1,6,10) / 12-bit sizes.
//
// Phase 1 chains the two converters: every 12-bit integer, then random ones
// with gaps, enter the integer-to-float path, and each float word that comes
// out is fed straight into the float-to-integer path. Every float word is
// checked against the reference model, every integer that comes back must
// equal the one sent (the format holds every 12-bit integer exactly; -2048
// comes back saturated to -2047), and the latencies must be 5 and 4 cycles.
// Phase 2 drives the float-to-integer path directly with words the first
// converter never produces: fractions below one, a zero exponent with a
// non-zero mantissa, values beyond the integer range and the all-ones
// exponent, while the integer path keeps converting random samples.
// It counts how often each mechanism occurred (two's complement of a negative
// input, zero input, the most negative input, truncation to zero, the zero
// exponent rule, saturation, negative output) and fails a mechanism that
// never did. A watchdog ends a hung run.
module tb_cpfp_top;
  import cpfp_ref_pkg::*;

  localparam int LAT_I2F = 5;
  localparam int LAT_F2I = 4;

  typedef struct {
    int          stamp;
    logic [11:0] x;      // integer sent (phase 1) or expected integer
    logic [16:0] w;      // float word
    logic        chain;  // came through the integer path
  } item_t;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        i2f_in_valid = 1'b0;
  logic [11:0] i2f_in_data = '0;
  logic        i2f_out_valid;
  logic [16:0] i2f_out_data;
  logic        f2i_in_valid;
  logic [16:0] f2i_in_data;
  logic        f2i_out_valid;
  logic [11:0] f2i_out_data;

  logic        chain_mode = 1'b1;
  logic        d_valid = 1'b0;
  logic [16:0] d_data = '0;

  assign f2i_in_valid = chain_mode ? i2f_out_valid : d_valid;
  assign f2i_in_data  = chain_mode ? i2f_out_data  : d_data;

  cpfp_top dut (
    .clk(clk), .rst_n(rst_n),
    .i2f_in_valid(i2f_in_valid), .i2f_in_data(i2f_in_data),
    .i2f_out_valid(i2f_out_valid), .i2f_out_data(i2f_out_data),
    .f2i_in_valid(f2i_in_valid), .f2i_in_data(f2i_in_data),
    .f2i_out_valid(f2i_out_valid), .f2i_out_data(f2i_out_data)
  );

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int roundtrips = 0;

  // mechanism counters
  int n_neg_in = 0, n_zero_in = 0, n_min_in = 0, n_pos_in = 0;
  int n_underflow = 0, n_zero_exp = 0, n_saturate = 0, n_inf = 0, n_neg_out = 0;

  item_t q_i2f[$];
  item_t q_f2i[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Classify a float word entering the float-to-integer path.
  task automatic note_f2i(input logic [16:0] w);
    cpfp_pkg::cpfp_t f;
    int e;
    f = w;
    e = int'(f.exponent);
    if (e == 0 && f.mantissa != 0)    n_zero_exp++;
    if (e != 0 && e < 31)             n_underflow++;
    if (e > 41)                       n_saturate++;
    if (e == 63)                      n_inf++;
    if (f.sign && e >= 31)            n_neg_out++;
  endtask

  // Output monitor, sampled away from the clock edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (i2f_out_valid) begin
        item_t it;
        checks++;
        if (q_i2f.size() == 0) fail("unexpected i2f output");
        else begin
          it = q_i2f.pop_front();
          if (cyc - it.stamp != LAT_I2F)
            fail($sformatf("i2f latency %0d", cyc - it.stamp));
          if (i2f_out_data !== ref_i2f(it.x))
            fail($sformatf("i2f %b -> %b expected %b", it.x, i2f_out_data, ref_i2f(it.x)));
          if (chain_mode) begin
            item_t nx;
            nx.stamp = cyc; nx.x = it.x; nx.w = i2f_out_data; nx.chain = 1'b1;
            q_f2i.push_back(nx);
            note_f2i(i2f_out_data);
          end
        end
      end
      if (f2i_out_valid) begin
        item_t it;
        checks++;
        if (q_f2i.size() == 0) fail("unexpected f2i output");
        else begin
          it = q_f2i.pop_front();
          if (cyc - it.stamp != LAT_F2I)
            fail($sformatf("f2i latency %0d", cyc - it.stamp));
          if (it.chain) begin
            logic [11:0] back;
            back = (it.x == 12'h800) ? 12'h801 : it.x;
            roundtrips++;
            if (f2i_out_data !== back)
              fail($sformatf("round trip %0d -> %b -> %0d", $signed(it.x), it.w, $signed(f2i_out_data)));
          end else if (f2i_out_data !== it.x)
            fail($sformatf("f2i %b -> %0d expected %0d", it.w, $signed(f2i_out_data), $signed(it.x)));
        end
      end
    end
  end

  task automatic drive_int(input logic v, input logic [11:0] x);
    item_t it;
    i2f_in_valid = v;
    i2f_in_data  = x;
    if (v) begin
      it.stamp = cyc; it.x = x; it.w = '0; it.chain = 1'b0;
      q_i2f.push_back(it);
      if (x == 12'h800)   n_min_in++;
      else if (x[11])     n_neg_in++;
      else if (x == 0)    n_zero_in++;
      else                n_pos_in++;
    end
  endtask

  task automatic drive_word(input logic v, input logic [16:0] w);
    item_t it;
    d_valid = v;
    d_data  = w;
    if (v) begin
      it.stamp = cyc; it.x = ref_f2i(w); it.w = w; it.chain = 1'b0;
      q_f2i.push_back(it);
      note_f2i(w);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Phase 1: chained round trip.
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      drive_int(1'b1, 12'(i));
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      drive_int($urandom_range(0, 2) != 0, 12'($urandom));
    end
    @(negedge clk) drive_int(1'b0, '0);
    repeat (LAT_I2F + LAT_F2I + 2) @(negedge clk);

    // Phase 2: direct words into the float path, random integers alongside.
    @(negedge clk) chain_mode = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      logic [16:0] w;
      w = 17'($urandom);
      case (i % 5)
        0: w[15:10] = 6'($urandom_range(1, 30));   // below one
        1: w[15:10] = 6'd0;                        // zero exponent
        2: w[15:10] = 6'($urandom_range(42, 62));  // too large
        3: w[15:10] = 6'd63;                       // all-ones exponent
        default: ;
      endcase
      if (i % 5 == 1 && w[9:0] == 0) w[0] = 1'b1;
      @(negedge clk);
      drive_word($urandom_range(0, 3) != 0, w);
      drive_int($urandom_range(0, 1) != 0, 12'($urandom));
    end
    @(negedge clk);
    drive_word(1'b0, '0);
    drive_int(1'b0, '0);
    repeat (LAT_I2F + LAT_F2I + 2) @(negedge clk);

    checks++;
    if (q_i2f.size() != 0 || q_f2i.size() != 0) fail("results missing at the end");

    $display("mechanisms: neg_in=%0d pos_in=%0d zero_in=%0d min_in=%0d underflow=%0d zero_exp=%0d saturate=%0d inf=%0d neg_out=%0d roundtrips=%0d",
             n_neg_in, n_pos_in, n_zero_in, n_min_in, n_underflow, n_zero_exp, n_saturate, n_inf, n_neg_out, roundtrips);
    checks += 10;
    if (n_neg_in == 0)    fail("no negative input");
    if (n_pos_in == 0)    fail("no positive input");
    if (n_zero_in == 0)   fail("no zero input");
    if (n_min_in == 0)    fail("no most negative input");
    if (n_underflow == 0) fail("no truncation to zero");
    if (n_zero_exp == 0)  fail("no zero exponent");
    if (n_saturate == 0)  fail("no saturation");
    if (n_inf == 0)       fail("no all-ones exponent");
    if (n_neg_out == 0)   fail("no negative output");
    if (roundtrips < 4096) fail("too few round trips");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
