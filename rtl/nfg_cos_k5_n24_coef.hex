f3e5f3ffff419001ee940060cbff6900baf149e257a652a4
e18d95fffe44b0017ca300e0c82f8c2a04ddd655d5de4a2b
d510f7fffdc900010080011f806fb1f0fbd44e1553f45a3a
c76954fffd7eb0005dd4014546dfe36eddce905841727d08
