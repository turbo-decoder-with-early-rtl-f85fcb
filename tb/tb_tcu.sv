// Exhaustive test of the threshold comparison unit over all extrinsic
// values, thresholds 0..63 and both input status values.
module tb_tcu;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic status_in, status_out, we;
  llr_t le, thr, le_out;

  tcu dut (.*);

  initial begin
    for (int st = 0; st < 2; st++)
      for (int t = 0; t < 64; t++)
        for (int v = -64; v < 64; v++) begin
          int mag;
          bit es, ew;
          status_in = 1'(st); thr = llr_t'(t); le = llr_t'(v);
          #1;
          mag = (v < 0) ? -v : v;
          es  = st ? 1'b1 : (mag > t);
          ew  = !st;
          checks++;
          if (status_out != es || we != ew || le_out != le) begin
            failures++;
            if (failures < 10) $display("FAIL st=%0d thr=%0d le=%0d: status %0d we %0d", st, t, v, status_out, we);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
