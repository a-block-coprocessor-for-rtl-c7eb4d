// tb_interface_unit: checks the bus slave. Writes of random length (1 to 4
// cycles of strobe) must give exactly one config or data pulse carrying the
// written fields; reads must return the result and status words at their
// addresses and drive data_oe only while reading; chip enable high must
// block both.
module tb_interface_unit;
  import gprs_edc_pkg::*;

  logic clk = 1'b0, reset;
  logic ce_n, rd_n, wr_n;
  logic [1:0] addr;
  logic [15:0] data_in, data_out;
  logic data_oe;
  logic cfg_we, bit_we, bit_val;
  cs_e cfg_cs;
  logic [2:0] cfg_section;
  logic done, found, ambiguous;
  logic [POS_W-1:0] pos, bit_cnt;
  int checks = 0, failures = 0;
  int n_cfg = 0, n_bit = 0, last_bit = 0;
  cs_e last_cs;
  logic [2:0] last_sec;

  interface_unit #(.DATA_W(16), .ADDR_W(2), .SEC_W(3)) dut (.*);

  always #5 clk = ~clk;

  // Count the pulses the co-processor side sees.
  always_ff @(posedge clk) begin
    if (cfg_we) begin n_cfg <= n_cfg + 1; last_cs <= cfg_cs; last_sec <= cfg_section; end
    if (bit_we) begin n_bit <= n_bit + 1; last_bit <= int'(bit_val); end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus_write(logic [1:0] a, logic [15:0] d, int len, bit ce);
    addr = a; data_in = d; ce_n = ~ce; wr_n = 1'b0;
    repeat (len) @(posedge clk);
    #1; wr_n = 1'b1; ce_n = 1'b1;
    @(posedge clk); #1;
  endtask

  initial begin
    int c0, b0, len;
    logic [15:0] d;
    reset = 1'b1; ce_n = 1'b1; rd_n = 1'b1; wr_n = 1'b1; addr = '0; data_in = '0;
    done = 1'b0; found = 1'b0; ambiguous = 1'b0; pos = '0; bit_cnt = '0;
    repeat (2) @(posedge clk); #1;
    reset = 1'b0;
    for (int t = 0; t < 300; t++) begin
      c0 = n_cfg; b0 = n_bit;
      len = $urandom_range(1, 4);
      d = 16'($urandom);
      case (t % 3)
        0: begin
          bus_write(2'd0, d, len, 1'b1);
          check(n_cfg == c0 + 1 && n_bit == b0, "one config pulse per write");
          check(last_cs == cs_e'(d[1:0]) && last_sec == d[4:2], "config fields");
        end
        1: begin
          bus_write(2'd1, d, len, 1'b1);
          check(n_bit == b0 + 1 && n_cfg == c0, "one data pulse per write");
          check(last_bit == int'(d[0]), "data bit on D0");
        end
        default: begin
          bus_write(2'($urandom_range(0, 1)), d, len, 1'b0);
          check(n_bit == b0 && n_cfg == c0, "chip enable blocks writes");
        end
      endcase
      // reads
      done = 1'($urandom); found = 1'($urandom); ambiguous = 1'($urandom);
      pos = POS_W'($urandom); bit_cnt = POS_W'($urandom);
      ce_n = 1'b0; rd_n = 1'b0; addr = 2'd0; #1;
      check(data_oe && data_out == {7'd0, pos}, "result read");
      addr = 2'd1; #1;
      check(data_oe && data_out == {3'd0, bit_cnt, 1'b0, ambiguous, found, done}, "status read");
      ce_n = 1'b1; #1;
      check(!data_oe && data_out == 0, "no drive without chip enable");
      rd_n = 1'b1; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
