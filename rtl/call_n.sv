// call_n: N-way Call module (hardware subroutine call).
//
// Mutually exclusive clients request a shared resource with a transition on
// R[i]; the request is merged onto RS, and when the resource answers with a
// transition on AS the acknowledge is routed back to the client that asked,
// as a transition on A[i]. Only one client may be active at a time.
//
// The module is a network of XORs and C-elements:
//   RS   = R[0] ^ ... ^ R[N-1]
//   A[i] = C( R[i], AS ^ (XOR of R[j], j != i) )
// At rest AS = RS, so the second input of every C-element equals its R[i].
// When client i requests, R[i] changes and the second input of C-element i
// follows only when AS changes, so A[i] fires after AS. For every other
// client j the second input is pulled away from R[j] by R[i] and brought
// back by AS, so A[j] holds. R[i] itself does not reach the second input of
// its own C-element, so no reconvergent path (and no glitch) exists there;
// writing that input as AS ^ RS ^ R[i] would create one. No path runs from
// one A to another, so in the OR-mode test the network is loop-free.
//
// That a Call is a network of XORs and C-elements is given; this particular
// network is this design's choice. The C-elements are the testable
// c_element cells and share the global CLR and CTEST lines. N defaults to 2
// (the basic Call; 3- and 4-way Calls are also in the library).
module call_n #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] r,      // client requests
  output logic [N-1:0] a,      // client acknowledges
  output logic         rs,     // request to the shared resource
  input  logic         as_i,   // acknowledge from the shared resource
  input  logic         clr,    // global clear of the C-elements
  input  logic         ctest   // C-element OR-mode test
);

  logic [N-1:0] w;  // second input of each C-element

  assign rs = ^r;

  for (genvar i = 0; i < N; i++) begin : g_client
    assign w[i] = as_i ^ (^(r & ~(N'(1) << i)));
    c_element u_c (.a(r[i]), .b(w[i]), .clr(clr), .ctest(ctest), .c(a[i]));
  end

endmodule
