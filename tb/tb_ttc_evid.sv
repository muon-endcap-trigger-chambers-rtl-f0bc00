// tb_ttc_evid: drives BCR, ECR, OCR, L1A and trigger types into ttc_evid
// and checks every pushed event ID and the orbit count against a model
// that counts bunches from the BCR offset.
module tb_ttc_evid;
  import rod_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bcr, ecr, ocr, l1a, tt_strobe, evid_wr, tt_wr;
  logic [7:0] tt, tt_data;
  logic [11:0] bc_offset, bcid;
  logic [43:0] evid_data;
  logic [31:0] orbit;
  ttc_evid dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int m_bc, m_l1, m_ecr, m_orbit;
  initial begin
    {bcr, ecr, ocr, l1a, tt_strobe} = '0; tt = 0; bc_offset = 12'd5;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // first BCR starts the model
    bcr = 1; @(negedge clk); bcr = 0;
    m_bc = 5; m_l1 = 0; m_ecr = 0; m_orbit = 1;
    for (int n = 0; n < 20000; n++) begin
      bcr = (m_bc == 3563 + 5) || ($urandom_range(0, 4999) == 0);
      ecr = $urandom_range(0, 1999) == 0;
      ocr = $urandom_range(0, 9999) == 0;
      l1a = $urandom_range(0, 9) == 0;
      tt_strobe = $urandom_range(0, 9) == 0;
      tt = 8'($urandom);
      #1;
      if (l1a) begin
        check(evid_wr, "evid_wr on L1A");
        check(evid_data == {8'(m_ecr), 24'(m_l1), 12'(m_bc)},
              $sformatf("evid %h exp %h", evid_data, {8'(m_ecr), 24'(m_l1), 12'(m_bc)}));
      end else check(!evid_wr, "no evid_wr");
      check(tt_wr == tt_strobe && tt_data == tt, "trigger type push");
      @(negedge clk);
      m_bc = bcr ? 5 : (m_bc + 1) % 4096;
      if (ocr) m_orbit = 0; else if (bcr) m_orbit++;
      if (ecr) begin m_l1 = 0; m_ecr = (m_ecr + 1) % 256; end
      else if (l1a) m_l1++;
      check(bcid == 12'(m_bc) && orbit == 32'(m_orbit), "bcid/orbit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
