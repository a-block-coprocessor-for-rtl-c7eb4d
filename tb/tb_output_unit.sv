// tb_output_unit: checks the pass search over random pass and valid masks
// against a straightforward scan, for several section bases.
module tb_output_unit;
  import gprs_edc_pkg::*;

  localparam int N = 64;
  logic [N-1:0] pass, valid;
  logic [POS_W-1:0] base, pos;
  logic found;
  logic [$clog2(N+1)-1:0] n_pass;
  int checks = 0, failures = 0;

  output_unit #(.N_CRC(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first, cnt, sh;
    for (int t = 0; t < 2000; t++) begin
      case (t % 4)
        0: pass = '0;
        1: pass = N'(1) << $urandom_range(0, N - 1);
        2: pass = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        default: pass = {$urandom, $urandom};
      endcase
      sh = $urandom_range(0, N);
      valid = (t % 8 < 4) ? '1 : ('1 >> sh);
      base = POS_W'($urandom_range(0, 6) * N);
      first = -1; cnt = 0;
      for (int k = 0; k < N; k++)
        if (pass[k] && valid[k]) begin
          if (first < 0) first = k;
          cnt++;
        end
      #1;
      checks++;
      if (found !== (first >= 0) || n_pass != cnt ||
          (first >= 0 && pos != POS_W'(base + first))) begin
        failures++;
        $display("FAIL pass=%h valid=%h found=%0b pos=%0d n=%0d", pass, valid, found, pos, n_pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
