// tb_bt_load_mux: checks the scan words against bit strings written out here.
//
// The SI_CMS string of an IR+DR scan is 110000000111000000000110; its SI_CDI
// string is 4 zeros, the address LSB first, 4 zeros, the value LSB first and
// 2 zeros. A DR-only scan is the last 13 characters of each, followed by
// zeros to fill 24 bits. Character 0 of a string is bit 23 of the word.
// Random addresses and values, both settings of r_sel.
module tb_bt_load_mux;

  logic        r_sel;
  logic [5:0]  reg_addr;
  logic [7:0]  ctrl_value, freq_value;
  logic [23:0] cms_word, cdi_word;

  int checks = 0, failures = 0;

  bt_load_mux dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] from_string(string s, int first, int len);
    logic [23:0] w = '0;
    for (int k = 0; k < len; k++)
      w[23 - k] = (s[first + k] == "1");
    return w;
  endfunction

  function automatic string cdi_string(logic [5:0] a, logic [7:0] v);
    string s = "0000";
    for (int k = 0; k < 6; k++) s = {s, a[k] ? "1" : "0"};
    s = {s, "0000"};
    for (int k = 0; k < 8; k++) s = {s, v[k] ? "1" : "0"};
    s = {s, "00"};
    return s;
  endfunction

  localparam string CMS = "110000000111000000000110";

  initial begin
    check(CMS.len() == 24, "reference string length");
    for (int t = 0; t < 400; t++) begin
      string cdi;
      r_sel      = t[0];
      reg_addr   = 6'($urandom);
      ctrl_value = 8'($urandom);
      freq_value = 8'($urandom);
      #1;
      if (!r_sel) begin
        cdi = cdi_string(reg_addr, ctrl_value);
        check(cms_word == from_string(CMS, 0, 24), $sformatf("IR+DR cms %h", cms_word));
        check(cdi_word == from_string(cdi, 0, 24), $sformatf("IR+DR cdi %h for %h/%h", cdi_word, reg_addr, ctrl_value));
      end else begin
        cdi = cdi_string(reg_addr, freq_value);
        check(cms_word == from_string(CMS, 11, 13), $sformatf("DR cms %h", cms_word));
        check(cdi_word == from_string(cdi, 11, 13), $sformatf("DR cdi %h for %h", cdi_word, freq_value));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
