// tb_agc_regfile: random writes through all four write ports, checked
// against a plain array: register 7 always reads zero, register 5 reads the
// supplied Z value, writes need en, and the A/L/Q ports win over the general
// port on the same register.
module tb_agc_regfile;
  import agc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [3:0] rd_idx, wk_idx;
  word_t rd_data, z_value, wk_data, wa_data, wl_data, wq_data;
  logic wk_en, wa_en, wl_en, wq_en;
  word_t reg_a, reg_l, reg_q, reg_eb, reg_fb;
  word_t ref_r [16];
  int checks = 0, failures = 0;

  agc_regfile dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (ref_r[i]) ref_r[i] = '0;
    {wk_en, wa_en, wl_en, wq_en} = '0;
    wk_idx = 0; wk_data = 0; wa_data = 0; wl_data = 0; wq_data = 0; rd_idx = 0; z_value = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      wk_en = 1'($urandom_range(0, 1)); wk_idx = 4'($urandom); wk_data = 15'($urandom);
      wa_en = ($urandom_range(0, 3) == 0); wa_data = 15'($urandom);
      wl_en = ($urandom_range(0, 3) == 0); wl_data = 15'($urandom);
      wq_en = ($urandom_range(0, 3) == 0); wq_data = 15'($urandom);
      z_value = 15'($urandom);
      @(posedge clk);
      if (en) begin
        if (wk_en && wk_idx != 5 && wk_idx != 7) ref_r[wk_idx] = wk_data;
        if (wa_en) ref_r[0] = wa_data;
        if (wl_en) ref_r[1] = wl_data;
        if (wq_en) ref_r[2] = wq_data;
      end
      #1;
      for (int r = 0; r < 16; r++) begin
        rd_idx = 4'(r); #0.1;
        if (r == 7) check(rd_data == '0, "ZERO reads 0");
        else if (r == 5) check(rd_data == z_value, "Z reads pc");
        else check(rd_data == ref_r[r], $sformatf("reg %0d = %h, expected %h", r, rd_data, ref_r[r]));
      end
      check(reg_a == ref_r[0] && reg_l == ref_r[1] && reg_q == ref_r[2] &&
            reg_eb == ref_r[3] && reg_fb == ref_r[4], "direct outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
