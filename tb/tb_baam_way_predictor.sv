// tb_baam_way_predictor: exhaustive self-checking testbench of the MRU way
// predictor: every combination of enable, hit strobe, one-hot or empty hit
// vector, refill strobe and refill way.
module tb_baam_way_predictor;
  logic enable, hit_upd, fill_upd, wr_en;
  logic [3:0] hit_vec;
  logic [1:0] fill_way, wr_flag;
  int checks = 0, failures = 0;

  baam_way_predictor dut (.enable, .hit_upd, .hit_vec, .fill_upd, .fill_way, .wr_en, .wr_flag);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_we; int exp_flag;
    for (int e = 0; e < 2; e++)
      for (int h = 0; h < 2; h++)
        for (int f = 0; f < 2; f++)
          for (int hv = -1; hv < 4; hv++)
            for (int fw = 0; fw < 4; fw++) begin
              enable = e[0]; hit_upd = h[0]; fill_upd = f[0]; fill_way = 2'(fw);
              hit_vec = (hv < 0) ? 4'b0 : 4'(1 << hv);
              #1;
              exp_we = e[0] && (f[0] || (h[0] && hv >= 0));
              exp_flag = f[0] ? fw : hv;
              check(wr_en == exp_we, $sformatf("wr_en e%0d h%0d f%0d hv%0d", e, h, f, hv));
              if (exp_we) check(int'(wr_flag) == exp_flag, $sformatf("flag e%0d h%0d f%0d hv%0d fw%0d", e, h, f, hv, fw));
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
