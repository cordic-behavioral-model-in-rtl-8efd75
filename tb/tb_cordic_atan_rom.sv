// tb_cordic_atan_rom: checks the elementary-angle table.
//
// Two instances: the default one (4-bit index, entries 0..15) and one with a
// 7-bit index that also reaches past the 60-entry table into the region where
// the last angle is halved per step. Entries are compared with
// round(atan(2^-k) * 2^29) recomputed here and, for a handful of k, with
// constants worked out by hand beforehand.
module tb_cordic_atan_rom;
  import cordic_ref_pkg::*;

  logic [3:0]  idx_a;
  logic [31:0] ang_a;
  logic [6:0]  idx_b;
  logic [31:0] ang_b;

  int checks = 0;
  int failures = 0;

  cordic_atan_rom dut_a (.idx(idx_a), .angle(ang_a));
  cordic_atan_rom #(.IDX_W(7)) dut_b (.idx(idx_b), .angle(ang_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int known_k[6] = '{0, 1, 2, 3, 9, 20};
  int known_v[6] = '{32'h1921FB54, 32'h0ED63383, 32'h07D6DD7E, 32'h03FAB753, 32'h000FFFFF, 32'h00000200};

  initial begin
    for (int k = 0; k < 16; k++) begin
      idx_a = 4'(k);
      #1;
      check(ang_a == ref_angle(k), $sformatf("default rom k=%0d got %h expected %h", k, ang_a, ref_angle(k)));
    end
    for (int k = 0; k < 128; k++) begin
      idx_b = 7'(k);
      #1;
      check(ang_b == ref_angle(k), $sformatf("wide rom k=%0d got %h expected %h", k, ang_b, ref_angle(k)));
    end
    foreach (known_k[i]) begin
      idx_b = 7'(known_k[i]);
      #1;
      check(ang_b == known_v[i], $sformatf("k=%0d got %h expected %h", known_k[i], ang_b, known_v[i]));
    end
    // Angles below 2^-29 round to zero at 29 fraction bits.
    idx_b = 7'd29; #1; check(ang_b == 32'd1, "k=29 should be one LSB");
    idx_b = 7'd31; #1; check(ang_b == 32'd0, "k=31 should be zero");
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
