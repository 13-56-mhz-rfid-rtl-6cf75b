// tb_crc_a: checks the CRC_A LFSR against a byte-wise reference and known
// values.
//
// Known values: CRC_A of 50 00 (HLTA) is CD57 (sent 57 CD), and a frame
// followed by its own CRC leaves a zero residue. Then 200 random frames of
// 1..9 bytes are compared with a table-free byte-wise reference computed in
// the testbench, and the latency (8 cycles per byte plus one) is checked.
module tb_crc_a;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;

  logic        start = 1'b0;
  logic [71:0] data = '0;
  logic [3:0]  nbytes = '0;
  logic        busy, done;
  logic [15:0] crc;

  crc_a #(.MAX_BYTES(9)) dut (.clk, .rst, .start, .data, .nbytes, .busy, .done, .crc);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: ISO 14443-3 annex byte update.
  function automatic logic [15:0] ref_crc(input logic [71:0] d, input int n);
    logic [15:0] w;
    logic [7:0]  b;
    w = 16'h6363;
    for (int i = 0; i < n; i++) begin
      b = d[8*i +: 8];
      b = b ^ w[7:0];
      b = b ^ (b << 4);
      w = (w >> 8) ^ (16'(b) << 8) ^ (16'(b) << 3) ^ (16'(b) >> 4);
    end
    return w;
  endfunction

  task automatic run(input logic [71:0] d, input int n, output logic [15:0] r, output int lat);
    @(negedge clk);
    data = d; nbytes = 4'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    r = crc;
  endtask

  initial begin
    logic [15:0] r;
    int lat;
    logic [71:0] d;
    int n;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    run(72'h0050, 2, r, lat);
    check(r == 16'hCD57, $sformatf("HLTA crc %h", r));
    check(lat == 17, $sformatf("latency %0d for 2 bytes", lat));
    run({40'h0, r, 16'h0050}, 4, r, lat);
    check(r == 16'h0000, $sformatf("residue %h", r));
    for (int k = 0; k < 200; k++) begin
      d = {$urandom, $urandom, $urandom};
      n = 1 + int'($urandom_range(8));
      for (int i = n; i < 9; i++) d[8*i +: 8] = 8'h00;
      run(d, n, r, lat);
      check(r == ref_crc(d, n), $sformatf("crc of %0d bytes %h: %h vs %h", n, d, r, ref_crc(d, n)));
      check(lat == 8 * n + 1, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
