// tb_ff_tx_rm: checks the transmit-side redundancy manager (combinational).
//
// For random values of the enable mask, the source's data / descriptor
// valid signals and the two transmitters' get signals, the outputs are
// compared with the expected behaviour: a word or descriptor is taken from
// the source only when every enabled transmitter can take it, and is then
// offered to exactly the enabled transmitters, with the same word and
// descriptor on both. A disabled transmitter never receives anything and
// never holds the source back.
module tb_ff_tx_rm;
  import ff_lynx_pkg::*;

  logic [1:0] en, tx_data_valid, tx_get_data, tx_frm_valid, tx_frm_get;
  logic [15:0] data, tx_data;
  logic data_valid, get_data, frm_valid, frm_get;
  fd_t frm_desc, tx_frm_desc;

  ff_tx_rm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      bit g, fg;
      en = 2'($urandom);
      data = 16'($urandom);
      frm_desc = fd_t'($urandom);
      data_valid = 1'($urandom);
      frm_valid = 1'($urandom);
      tx_get_data = 2'($urandom);
      tx_frm_get = 2'($urandom);
      #1;
      g  = (!en[0] || tx_get_data[0]) && (!en[1] || tx_get_data[1]);
      fg = (!en[0] || tx_frm_get[0]) && (!en[1] || tx_frm_get[1]);
      check(get_data == g, "get_data when all enabled transmitters can take");
      check(frm_get == fg, "frm_get when all enabled transmitters can take");
      check(tx_data_valid == ({2{data_valid && g}} & en), "word offered to enabled ones");
      check(tx_frm_valid == ({2{frm_valid && fg}} & en), "descriptor offered to enabled ones");
      check(tx_data == data && tx_frm_desc == frm_desc, "same word and descriptor");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
