// tb_yasir_err_gen: self-checking test of the err generator.
//
// Checks the CRC against the CRC-16/MODBUS check value (0x4B37 for "123456789") and
// the reference CRC on random octet strings, that `clr` restarts it, and that the two
// err octets never equal the CRC octets a device would compare them with.
module tb_yasir_err_gen;
  import yasir_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, upd_valid = 1'b0;
  logic [7:0] upd_data = '0, err0, err1;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  yasir_err_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic feed(input bytes_t m);
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    foreach (m[i]) begin
      upd_valid = 1'b1; upd_data = m[i];
      @(negedge clk);
      upd_valid = 1'b0;
      if ($urandom_range(1, 0)) @(negedge clk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t m;
    logic [15:0] ref_crc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    feed(str_bytes("123456789"));
    check(crc == 16'h4B37, $sformatf("CRC-16/MODBUS check value: %h", crc));
    for (int t = 0; t < 30; t++) begin
      m = rand_bytes($urandom_range(40, 0));
      feed(m);
      ref_crc = crc16(m);
      check(crc == ref_crc, $sformatf("CRC of %0d octets", m.size()));
      check(err0 != ref_crc[7:0] && err1 != ref_crc[15:8], "err differs from the true CRC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
