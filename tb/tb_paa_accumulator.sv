// tb_paa_accumulator: checks the (4,2) accumulator with its two latches. A
// stage-3 handshake is played by hand: present a slice product (as a random
// carry-save split), toggle cap (capture), check the total, toggle pass
// (next stage done). Three passes per multiply, most significant slice
// first, must leave (s + c) mod 2**48 equal to the sum of the slice products
// at their weights; the first pass of each multiply must discard the old
// total. The tag must travel with the data, and the output must hold while
// the input changes between cap and pass.
module tb_paa_accumulator;
  timeunit 1ps; timeprecision 1ps;
  localparam int W = 48, PW = 32;
  logic          rst_n, cap, pass, first;
  logic [PW-1:0] ps, pc;
  logic [1:0]    tag_in, tag;
  logic [W-1:0]  s, c;
  int checks = 0, failures = 0;

  paa_accumulator #(.W(W), .PW(PW), .SHIFT(8), .TW(2)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] total, hold_s, hold_c;
    logic [PW-1:0] p;
    rst_n = 1'b0; cap = 1'b0; pass = 1'b0; first = 1'b0; ps = '0; pc = '0; tag_in = '0;
    #10 rst_n = 1'b1;
    repeat (600) begin
      total = '0;
      for (int k = 0; k < 3; k++) begin
        // A product of 24 x 8 bits, split at random into two vectors whose
        // sum is exact (as the array's carry-save pairs are).
        p  = PW'(24'($urandom)) * PW'(8'($urandom));
        ps = PW'(longint'($urandom) % (longint'(p) + 1));
        pc = p - ps;
        first = (k == 0);
        tag_in = 2'(k);
        total = (total << 8) + W'(p);
        #10 cap = ~cap;
        #10;
        checks++;
        if (W'(s + c) !== total || tag !== 2'(k)) begin
          failures++;
          $display("ERROR: pass %0d total %h expected %h tag %0d", k, W'(s + c), total, tag);
        end
        hold_s = s; hold_c = c;
        ps = $urandom; pc = $urandom; first = 1'($urandom);
        #10;
        checks++;
        if (s !== hold_s || c !== hold_c) begin failures++; $display("ERROR: output changed while held"); end
        pass = ~pass;
        #10;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
