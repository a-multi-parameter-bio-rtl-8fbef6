// Self-checking testbench for id_checker: all 256 combinations of frame
// address and own address against the address plan (0 broadcast, 1..14 SEs,
// 15 invalid).
module tb_id_checker;
  import bio_pkg::*;
  logic [3:0] frame_addr, my_id;
  logic id_valid, match, bcast;
  int checks = 0, failures = 0;

  id_checker dut (.frame_addr, .my_id, .id_valid, .match, .bcast);

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int f = 0; f < 16; f++) begin
        my_id = 4'(i);
        frame_addr = 4'(f);
        #1;
        checks++;
        if (id_valid !== (i >= 1 && i <= 14) || bcast !== (f == 0) ||
            match !== (i >= 1 && i <= 14 && f == i)) begin
          failures++;
          $display("FAIL: id %0d frame %0d -> valid %b match %b bcast %b", i, f, id_valid, match, bcast);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
