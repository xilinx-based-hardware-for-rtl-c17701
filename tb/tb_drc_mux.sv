// tb_drc_mux: random inputs; the controller lines must follow the mode
// load, else the data processor when selected, else the PC.
module tb_drc_mux;
  logic prg_ml, pc_req, pc_we, xl_sel, xl_req, xl_we, drc_ml, drc_req, drc_we;
  logic [17:0] prg_word, pc_addr, xl_addr, drc_addr;
  logic [15:0] pc_wdata, xl_wdata, drc_wdata;
  int checks = 0, failures = 0;
  drc_mux dut (.*);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      {prg_ml, pc_req, pc_we, xl_sel, xl_req, xl_we} = 6'($urandom);
      if (i % 2 == 0) prg_ml = 0;
      prg_word = 18'($urandom); pc_addr = 18'($urandom); xl_addr = 18'($urandom);
      pc_wdata = 16'($urandom); xl_wdata = 16'($urandom);
      #1;
      checks++;
      if (prg_ml) begin
        if (!drc_ml || drc_req || drc_addr !== prg_word) begin failures++; $display("FAIL ml"); end
      end else if (xl_sel) begin
        if (drc_ml || drc_req !== xl_req || drc_we !== xl_we || drc_addr !== xl_addr || drc_wdata !== xl_wdata)
          begin failures++; $display("FAIL xl"); end
      end else begin
        if (drc_ml || drc_req !== pc_req || drc_we !== pc_we || drc_addr !== pc_addr || drc_wdata !== pc_wdata)
          begin failures++; $display("FAIL pc"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
