// tb_locality_detector: exhaustive-style random test of the spatial locality
// detector. For each fetch size (1, 2 and 4 PCLs per VCL) it drives random
// neighbour tags/valid bits and random valid/used bits of the replaced VCL
// and compares `good` and `poor` with a reference written from the rules:
// good when any valid neighbour tag equals the missing tag; poor when the
// VCL has more than one PCL, holds a valid PCL, and its first or second half
// has no PCL that is both valid and used.
module tb_locality_detector;
  import afs_pkg::*;
  localparam int WAYS = 4, TAG_W = 20, MAXP = 4;
  fsz_t fsz;
  logic [TAG_W-1:0] req_tag;
  logic [TAG_W-1:0] nbr_tag [WAYS];
  logic [WAYS-1:0] nbr_valid;
  logic [MAXP-1:0] victim_valid, victim_used;
  logic good, poor;
  locality_detector #(.WAYS(WAYS), .TAG_W(TAG_W), .MAXP(MAXP)) dut (.*);

  int checks = 0, failures = 0;
  int n_good = 0, n_poor = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6000; n++) begin
      bit eg, ep, any_v, first_u, second_u;
      int np;
      fsz = fsz_t'(n % 3);
      req_tag = TAG_W'($urandom);
      for (int w = 0; w < WAYS; w++)
        nbr_tag[w] = ($urandom_range(0, 3) == 0) ? req_tag : TAG_W'($urandom);
      nbr_valid    = 4'($urandom);
      victim_valid = 4'($urandom);
      victim_used  = 4'($urandom);
      #1;
      eg = 0;
      for (int w = 0; w < WAYS; w++) eg |= nbr_valid[w] && (nbr_tag[w] == req_tag);
      np = 1 << fsz;
      any_v = 0; first_u = 1; second_u = 1;
      for (int k = 0; k < np; k++) begin
        any_v |= victim_valid[k];
        if (k < np / 2) first_u  &= !(victim_valid[k] && victim_used[k]);
        else            second_u &= !(victim_valid[k] && victim_used[k]);
      end
      ep = (np > 1) && any_v && (first_u || second_u);
      checks += 2;
      if (good !== eg) begin failures++; $display("FAIL good v=%0d", fsz); end
      if (poor !== ep) begin
        failures++;
        $display("FAIL poor v=%0d valid=%b used=%b got %b", fsz, victim_valid, victim_used, poor);
      end
      n_good += int'(good); n_poor += int'(poor);
    end
    // Directed: 4-PCL VCL with only the first PCL used is poor; all used is not.
    fsz = 2; victim_valid = 4'b1111; victim_used = 4'b0001; #1;
    checks++; if (poor !== 1'b1) failures++;
    victim_used = 4'b1111; #1;
    checks++; if (poor !== 1'b0) failures++;
    victim_used = 4'b0100; victim_valid = 4'b0101; #1;   // second half used, first half used? no
    checks++; if (poor !== 1'b1) failures++;
    checks++; if (n_good == 0 || n_poor == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
