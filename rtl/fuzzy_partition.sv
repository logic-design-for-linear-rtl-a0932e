// Three-set fuzzy partition of one crisp input (helper of fuzzy_logic_unit).
//
// Breakpoints B1 < B2 < B3 split the input range into the sets normal,
// warning and critical, with degrees from 0 to MU_ONE:
//   normal   = MU_ONE up to B1, falling linearly to 0 at B2
//   warning  = 0 up to B1, rising to MU_ONE at B2, falling to 0 at B3
//   critical = 0 up to B2, rising to MU_ONE at B3 and beyond
// Neighbouring degrees add up to MU_ONE (less truncation), so every input
// belongs to at least one set. Combinational; the shapes are this design's
// choice.
module fuzzy_partition
  import oil_pkg::*;
#(
  parameter int unsigned IN_W = 16,
  parameter int unsigned B1   = 1,
  parameter int unsigned B2   = 2,
  parameter int unsigned B3   = 3
) (
  input  logic [IN_W-1:0] v,
  output fuzzy_mu_t       mu
);

  localparam int unsigned D12 = B2 - B1;
  localparam int unsigned D23 = B3 - B2;

  logic [31:0] vi;

  assign vi = 32'(v);

  always_comb begin
    if (vi <= B1)      mu.normal = mu_t'(MU_ONE);
    else if (vi >= B2) mu.normal = '0;
    else               mu.normal = mu_t'(MU_ONE * (B2 - vi) / D12);

    if (vi <= B1 || vi >= B3) mu.warning = '0;
    else if (vi <= B2)        mu.warning = mu_t'(MU_ONE * (vi - B1) / D12);
    else                      mu.warning = mu_t'(MU_ONE * (B3 - vi) / D23);

    if (vi <= B2)      mu.critical = '0;
    else if (vi >= B3) mu.critical = mu_t'(MU_ONE);
    else               mu.critical = mu_t'(MU_ONE * (vi - B2) / D23);
  end

  initial assert (B1 < B2 && B2 < B3) else $error("fuzzy_partition: need B1 < B2 < B3");

endmodule
