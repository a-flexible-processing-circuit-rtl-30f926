// tb_morph_out_mux: self-checking test of the output multiplexer.  For each
// selection and random valid/ready/data values, the output must carry the
// selected source and only that source may see ready.
module tb_morph_out_mux;
  import morph_pkg::*;
  localparam int DW = 16;

  out_sel_e sel = SEL_PU1;
  logic pu1_valid, pu2_valid, sub_valid, out_ready, pu1_ready, pu2_ready, sub_ready, out_valid;
  logic [DW-1:0] pu1_data, pu2_data, sub_data, out_data;
  int checks = 0, failures = 0;

  morph_out_mux #(.DW(DW)) dut (.*);

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic ev, er1, er2, er3;
      logic [DW-1:0] ed;
      sel = out_sel_e'(i % 3);
      {pu1_valid, pu2_valid, sub_valid, out_ready} = 4'($urandom);
      pu1_data = DW'($urandom); pu2_data = DW'($urandom); sub_data = DW'($urandom);
      #1;
      case (i % 3)
        0: begin ev = pu1_valid; ed = pu1_data; end
        1: begin ev = pu2_valid; ed = pu2_data; end
        default: begin ev = sub_valid; ed = sub_data; end
      endcase
      er1 = (i % 3 == 0) && out_ready;
      er2 = (i % 3 == 1) && out_ready;
      er3 = (i % 3 == 2) && out_ready;
      checks++;
      if (out_valid !== ev || (ev && out_data !== ed) ||
          pu1_ready !== er1 || pu2_ready !== er2 || sub_ready !== er3) begin
        failures++;
        if (failures < 10) $display("MISMATCH sel=%0d", i % 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
