// tb_int12_to_cpfp17 -- self-checking testbench of the integer-to-float
// converter.
//
// It first applies the five samples of the reference waveform (-2047, +2047,
// +1, 0, -1) and compares them with their printed 17-bit results, then sweeps
// every 12-bit integer back to back, then sends random samples with random
// gaps in in_valid. Each cycle it checks out_valid against what was sent five
// clock edges earlier (the latency) and, for a valid word, the data against
// the reference model of cpfp_ref_pkg. A watchdog ends the run as failed if
// it hangs.
module tb_int12_to_cpfp17;
  import cpfp_ref_pkg::*;

  localparam int LAT = 5;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [11:0] in_data = '0;
  logic        out_valid;
  logic [16:0] out_data;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  // What was driven before each edge, kept for LAT edges.
  logic        hv [16];
  logic [16:0] hd [16];

  int12_to_cpfp17 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < 16; i++) begin hv[i] = 1'b0; hd[i] = '0; end
  end

  // Drive one sample (or a bubble) for one cycle and check the output
  // belonging to the sample sent LAT edges before.
  task automatic step(input logic v, input logic [11:0] d, input logic [16:0] expect_w);
    @(negedge clk);
    if (cyc >= LAT + 2) begin
      checks++;
      if (out_valid !== hv[(cyc - LAT) % 16]) begin
        failures++;
        $display("FAIL valid at cycle %0d: got %b expected %b", cyc, out_valid, hv[(cyc - LAT) % 16]);
      end else if (out_valid) begin
        checks++;
        if (out_data !== hd[(cyc - LAT) % 16]) begin
          failures++;
          $display("FAIL data at cycle %0d: got %b expected %b", cyc, out_data, hd[(cyc - LAT) % 16]);
        end
      end
    end
    in_valid = v;
    in_data  = d;
    hv[cyc % 16] = v;
    hd[cyc % 16] = expect_w;
  endtask

  task automatic send(input logic [11:0] d);
    step(1'b1, d, ref_i2f(d));
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The reference model itself is checked against the printed waveform.
  task automatic check_ref(input logic [11:0] d, input logic [16:0] w);
    checks++;
    if (ref_i2f(d) !== w) begin
      failures++;
      $display("FAIL reference model %b -> %b expected %b", d, ref_i2f(d), w);
    end
  endtask

  initial begin
    check_ref(12'b100000000001, 17'b11010011111111111);  // -2047
    check_ref(12'b011111111111, 17'b01010011111111111);  // +2047
    check_ref(12'b000000000001, 17'b00111110000000000);  // +1
    check_ref(12'b000000000000, 17'b00000000000000000);  //  0
    check_ref(12'b111111111111, 17'b10111110000000000);  // -1
    check_ref(12'b100000000000, 17'b11010100000000000);  // -2048 = -1.0 * 2^11

    repeat (3) step(1'b0, '0, '0);
    @(negedge clk) rst_n = 1'b1;

    // Printed waveform samples, with their printed results.
    step(1'b1, 12'b100000000001, 17'b11010011111111111);
    step(1'b1, 12'b011111111111, 17'b01010011111111111);
    step(1'b1, 12'b000000000001, 17'b00111110000000000);
    step(1'b1, 12'b000000000000, 17'b00000000000000000);
    step(1'b1, 12'b111111111111, 17'b10111110000000000);

    // Every integer, back to back.
    for (int i = 0; i < 4096; i++) send(12'(i));

    // Random samples with bubbles.
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 3) == 0) step(1'b0, 12'($urandom), '0);
      else send(12'($urandom));
    end

    repeat (LAT + 2) step(1'b0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
