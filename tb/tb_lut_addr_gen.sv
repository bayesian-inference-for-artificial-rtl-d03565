// tb_lut_addr_gen: checks the look-up-table address of every slot against the
// kernel's index formulas, for the grid sizes 8x8 to 128x128 (maxDist+1 =
// 2^(bits+1), maxBear+1 = 2^(bits+2)) and random cells and sensor values.
module tb_lut_addr_gen;
  import bayes_pkg::*;
  import tb_lut_pkg::*;

  int checks = 0, failures = 0;

  kernel_args_t      args;
  logic [ADDR_W-1:0] cell_idx, addr;
  logic [SLOT_W-1:0] slot;

  lut_addr_gen dut (.args, .cell_idx, .slot, .addr);

  initial begin
    for (int bits = 3; bits <= 7; bits++) begin
      for (int n = 0; n < 400; n++) begin : g_case
        int unsigned md, mb, c, sv [6];
        logic [31:0] e;
        md = (1 << (bits + 1)) - 1;
        mb = (1 << (bits + 2)) - 1;
        c  = $urandom_range((1 << (2 * bits)) - 1);
        args = '0;
        args.n_cells   = 32'(1 << (2 * bits));
        args.max_dist  = 16'(md);
        args.max_bear  = 16'(mb);
        args.base_vec  = $urandom_range(1000);
        args.base_dist = 32'h0010_0000 + $urandom_range(1000);
        args.base_bear = 32'h0800_0000 + $urandom_range(1000);
        for (int s = 0; s < 6; s++) begin
          sv[s] = (s < 3) ? $urandom_range(md) : $urandom_range(mb);
          args.sensor[s] = 16'(sv[s]);
        end
        cell_idx = c;
        for (int s = 0; s < 7; s++) begin
          slot = 3'(s);
          #1;
          if (s < 3)      e = table_addr(args.base_dist, c, s, md, sv[s]);
          else if (s < 6) e = table_addr(args.base_bear, c, s - 3, mb, sv[s]);
          else            e = args.base_vec + c;
          checks++;
          if (addr !== e) begin
            failures++;
            $display("bits=%0d cell=%0d slot=%0d: got %h expected %h", bits, c, s, addr, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
