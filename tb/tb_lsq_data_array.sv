// tb_lsq_data_array: random writes on both ports and reads of the LSQ
// data storage, compared with an array kept by the testbench; includes
// simultaneous writes to two different entries and to the same entry.
module tb_lsq_data_array;
  import mdl_pkg::*;

  localparam int N = 64;
  logic clk = 0;
  logic wa_en, wb_en;
  logic [5:0] wa_idx, wb_idx, rd_idx;
  macro_t wa_data, wb_data, rd_data;
  macro_t model [N];
  bit     known [N];
  int checks = 0, failures = 0;

  lsq_data_array #(.ENTRIES(N)) dut (
    .clk, .wa_en_i(wa_en), .wa_idx_i(wa_idx), .wa_data_i(wa_data),
    .wb_en_i(wb_en), .wb_idx_i(wb_idx), .wb_data_i(wb_data),
    .rd_idx_i(rd_idx), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (known[i]) known[i] = 0;
    wa_en = 0; wb_en = 0; wa_idx = 0; wb_idx = 0; rd_idx = 0; wa_data = 0; wb_data = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // check a read
      rd_idx = 6'($urandom_range(0, N - 1));
      #1;
      if (known[rd_idx]) begin
        checks++;
        if (rd_data !== model[rd_idx]) begin
          failures++;
          if (failures < 10) $display("FAIL idx=%0d got=%h exp=%h", rd_idx, rd_data, model[rd_idx]);
        end
      end
      wa_en   = 1'($urandom_range(0, 1));
      wb_en   = 1'($urandom_range(0, 1));
      wa_idx  = 6'($urandom_range(0, N - 1));
      wb_idx  = (cyc % 50 == 0) ? wa_idx : 6'($urandom_range(0, N - 1));
      wa_data = {$urandom, $urandom};
      wb_data = {$urandom, $urandom};
      @(posedge clk);
      if (wa_en) begin model[wa_idx] = wa_data; known[wa_idx] = 1; end
      if (wb_en) begin model[wb_idx] = wb_data; known[wb_idx] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
