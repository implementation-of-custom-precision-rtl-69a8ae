// tb_cpfp17_to_int12 -- self-checking testbench of the float-to-integer
// converter.
//
// It first applies the five words of the reference waveform and compares the
// results with their printed 12-bit values (-2047, +2047, +1, 0, -1), then
// sweeps all 2^17 words back to back, then sends random words with random
// gaps in in_valid. Each cycle it checks out_valid against what was sent four
// clock edges earlier (the latency) and, for a valid result, the data against
// the real-arithmetic model of cpfp_ref_pkg. A watchdog ends a hung run.
module tb_cpfp17_to_int12;
  import cpfp_ref_pkg::*;

  localparam int LAT = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [16:0] in_data = '0;
  logic        out_valid;
  logic [11:0] out_data;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic        hv [16];
  logic [11:0] hd [16];
  logic [16:0] hw [16];

  cpfp17_to_int12 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int i = 0; i < 16; i++) begin hv[i] = 1'b0; hd[i] = '0; hw[i] = '0; end
  end

  task automatic step(input logic v, input logic [16:0] w, input logic [11:0] expect_i);
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
          $display("FAIL data for %b: got %b expected %b", hw[(cyc - LAT) % 16], out_data, hd[(cyc - LAT) % 16]);
        end
      end
    end
    in_valid = v;
    in_data  = w;
    hv[cyc % 16] = v;
    hd[cyc % 16] = expect_i;
    hw[cyc % 16] = w;
  endtask

  task automatic send(input logic [16:0] w);
    step(1'b1, w, ref_f2i(w));
  endtask

  task automatic check_ref(input logic [16:0] w, input logic [11:0] x);
    checks++;
    if (ref_f2i(w) !== x) begin
      failures++;
      $display("FAIL reference model %b -> %b expected %b", w, ref_f2i(w), x);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_ref(17'b11010011111111111, 12'b100000000001);  // -2047
    check_ref(17'b01010011111111111, 12'b011111111111);  // +2047
    check_ref(17'b00111110000000000, 12'b000000000001);  // +1
    check_ref(17'b00000000000000000, 12'b000000000000);  //  0
    check_ref(17'b10111110000000000, 12'b111111111111);  // -1
    check_ref(17'b00111101111111111, 12'd0);             // 0.999.. truncates
    check_ref(17'b01111110000000000, 12'd2047);          // +inf saturates

    repeat (3) step(1'b0, '0, '0);
    @(negedge clk) rst_n = 1'b1;

    step(1'b1, 17'b11010011111111111, 12'b100000000001);
    step(1'b1, 17'b01010011111111111, 12'b011111111111);
    step(1'b1, 17'b00111110000000000, 12'b000000000001);
    step(1'b1, 17'b00000000000000000, 12'b000000000000);
    step(1'b1, 17'b10111110000000000, 12'b111111111111);

    for (int i = 0; i < (1 << 17); i++) send(17'(i));

    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 3) == 0) step(1'b0, 17'($urandom), '0);
      else send(17'($urandom));
    end

    repeat (LAT + 2) step(1'b0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
